// imem: the single physical instruction memory of the processor.
//
// All threads fetch from this one memory; each thread's program counter
// starts at its own reset address, so threads either share one range of the
// memory (several copies of one program) or use ranges of their own (a
// multiprogrammed mix). The fetch port takes a byte address, drops its two
// low bits and returns the word one cycle later. A second, write-only port
// loads programs. WORDS = 16384 (64 KB) is the capacity of one FPGA "MegaRAM"
// block, which the document states every program must fit in.
module imem #(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW   = (WORDS <= 1) ? 1 : $clog2(WORDS)
) (
  input  logic          clk,
  // fetch port
  input  logic          fetch_en,
  input  logic [31:0]   fetch_addr,   // byte address
  output logic [31:0]   fetch_data,   // valid the cycle after fetch_en
  // program load port
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,    // word address
  input  logic [31:0]   load_data
);
  sdp_ram #(.DEPTH(WORDS), .WIDTH(32)) u_ram (
    .clk,
    .we(load_we), .waddr(load_addr), .wdata(load_data),
    .re(fetch_en), .raddr(fetch_addr[AW+1:2]), .rdata(fetch_data));
endmodule
