// mt_processor: a fine-grained multithreaded soft processor: the pipeline
// (mt_core) with its one shared instruction memory and one data memory
// divided into a private range per thread.
//
// Defaults are the 5-stage pipeline running 5 threads with 32 registers per
// thread, the configuration with the best area efficiency when there are as
// many threads as stages. STAGES selects 3, 5 or 7 stages; THREADS may be one
// lower than STAGES; NUM_REGS = 25 gives the reduced register file of the
// 5-stage design. Each memory holds 16384 words (64 KB).
//
// Use: hold rst_n low, load programs through the imem_load_* port and data
// through the dmem_host_* port, give every thread its start address on
// reset_pc, then release reset. Threads run until reset; a program ends by
// looping on itself. The host port reads a data word one cycle after its
// address (physical word address = thread * range + offset, see dmem). The
// retire port reports every instruction as it completes.
module mt_processor
  import mt_pkg::*;
#(
  parameter int unsigned STAGES     = 5,
  parameter int unsigned THREADS    = STAGES,
  parameter int unsigned NUM_REGS   = 32,
  parameter int unsigned IMEM_WORDS = 16384,
  parameter int unsigned DMEM_WORDS = 16384,
  localparam int unsigned TW        = (THREADS <= 1) ? 1 : $clog2(THREADS),
  localparam int unsigned IAW       = $clog2(IMEM_WORDS),
  localparam int unsigned DAW       = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [31:0]    reset_pc [THREADS],
  // program load
  input  logic           imem_load_we,
  input  logic [IAW-1:0] imem_load_addr,
  input  logic [31:0]    imem_load_data,
  // data memory host access
  input  logic           dmem_host_we,
  input  logic [DAW-1:0] dmem_host_addr,
  input  logic [31:0]    dmem_host_wdata,
  output logic [31:0]    dmem_host_rdata,
  // retirement and events
  output logic           retire,
  output logic [TW-1:0]  retire_tid,
  output logic [31:0]    retire_pc,
  output logic [31:0]    retire_instr,
  output logic           ev_stall,
  output logic           ev_redirect,
  output logic           ev_pc_bypass
);
  logic          imem_en;
  logic [31:0]   imem_addr, imem_data;
  logic          dmem_re, dmem_we, dmem_unsigned;
  logic [TW-1:0] dmem_tid;
  logic [31:0]   dmem_addr, dmem_wdata, dmem_rdata;
  mem_size_e     dmem_size;

  mt_core #(.STAGES(STAGES), .THREADS(THREADS), .NUM_REGS(NUM_REGS)) u_core (
    .clk, .rst_n, .reset_pc,
    .imem_en, .imem_addr, .imem_data,
    .dmem_re, .dmem_we, .dmem_tid, .dmem_addr, .dmem_size, .dmem_unsigned,
    .dmem_wdata, .dmem_rdata,
    .retire, .retire_tid, .retire_pc, .retire_instr,
    .ev_stall, .ev_redirect, .ev_pc_bypass);

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .fetch_en(imem_en), .fetch_addr(imem_addr), .fetch_data(imem_data),
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data));

  dmem #(.WORDS(DMEM_WORDS), .THREADS(THREADS)) u_dmem (
    .clk, .re(dmem_re), .we(dmem_we), .tid(dmem_tid), .addr(dmem_addr),
    .size(dmem_size), .is_unsigned(dmem_unsigned), .wdata(dmem_wdata),
    .rdata(dmem_rdata),
    .host_we(dmem_host_we), .host_addr(dmem_host_addr),
    .host_wdata(dmem_host_wdata), .host_rdata(dmem_host_rdata));
endmodule
