// mt_core: fine-grained multithreaded pipeline for the modified MIPS I subset
// (no delay slots, no Hi/Lo, 3-operand multiplies), with 3, 5 or 7 stages.
//
// Every cycle the next thread in round-robin order is fetched, so
// consecutive instructions in the pipeline come from different threads and
// are independent. With enough threads there is no hazard detection, no
// forwarding and no branch prediction: a branch or jump is resolved in the
// execute stage and only rewrites the PC of its own thread, which is fetched
// again only after the branch has been resolved. Each thread has its own
// range of the shared register file (mt_regfile) and of the data memory
// (dmem); instruction memory is shared.
//
// The memories are synchronous block memories: the fetch address is
// registered into the instruction memory at the start of F (the thread
// select and PC mux work in the cycle before), the register numbers are
// registered into the register file at the end of decode, and the data
// address into the data memory at the end of execute. Stages:
//
//   STAGES = 3:  F (fetch + decode)  E (execute)  [M]  W
//     Loads, shifts and multiplies take a second execute cycle M: the
//     multiplier-based shifter and the multiplier are split by a register,
//     and a load reads the data memory. This path is pipelined, so back-to-
//     back long instructions do not stall. A short instruction directly
//     behind a long one would reach the single write-back stage in the same
//     cycle; it is held in F for one cycle (the only stall of the design).
//   STAGES = 5:  F D E M W
//     Every unit is single-cycle: shifts use the multiplier, the multiply
//     finishes in E, loads read memory in M. No stalls: IPC is 1.
//   STAGES = 7:  F D R E1 E2 M W
//     R registers the operands, E1 holds the ALU, barrel shifter and
//     branch resolution and starts the multiply, E2 finishes the multiply
//     and sends the address to the data memory. No stalls: IPC is 1.
//
// THREADS may be one less than STAGES (and as low as 2 for the 3-stage,
// 3 for the 5-stage and 5 for the 7-stage pipeline). Then a thread can be
// re-fetched in the cycle its branch resolves, and the branch target is
// forwarded to the fetch address (inside thread_pcs); in the 3-stage
// pipeline with 2 threads an instruction is also held in F while its own
// thread has a long instruction in M. The register file returns a value
// written on the same edge it is read, which covers the closest
// write-to-read distance.
//
// Interface: the instruction memory fetch port (one cycle read latency), the
// data memory core port (one cycle load latency) and a retire port reporting
// each instruction as it leaves W, plus event outputs used for measurement.
// The stage split of each depth, the instruction encodings of MUL/MULH and
// the minimum thread counts follow from this implementation; the document
// fixes only the stage counts, the unit types per depth and which paths are
// multicycle.
module mt_core
  import mt_pkg::*;
#(
  parameter int unsigned STAGES   = 5,
  parameter int unsigned THREADS  = STAGES,
  parameter int unsigned NUM_REGS = 32,
  localparam int unsigned TW      = (THREADS <= 1) ? 1 : $clog2(THREADS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   reset_pc [THREADS],
  // instruction memory
  output logic          imem_en,
  output logic [31:0]   imem_addr,
  input  logic [31:0]   imem_data,
  // data memory
  output logic          dmem_re,
  output logic          dmem_we,
  output logic [TW-1:0] dmem_tid,
  output logic [31:0]   dmem_addr,
  output mem_size_e     dmem_size,
  output logic          dmem_unsigned,
  output logic [31:0]   dmem_wdata,
  input  logic [31:0]   dmem_rdata,
  // retirement and events
  output logic          retire,
  output logic [TW-1:0] retire_tid,
  output logic [31:0]   retire_pc,
  output logic [31:0]   retire_instr,
  output logic          ev_stall,       // F held this cycle (3-stage only)
  output logic          ev_redirect,    // taken branch or jump resolved
  output logic          ev_pc_bypass    // branch target forwarded to fetch
);
  localparam bit          HAS_IR     = (STAGES >= 5);
  localparam bit          HAS_R      = (STAGES == 7);
  localparam bit          HAS_E2     = (STAGES == 7);
  localparam bit          SHIFT_MULT = (STAGES <= 5);
  localparam int unsigned UNIT_LAT   = (STAGES == 5) ? 0 : 1;
  localparam int unsigned MIN_THREADS = (STAGES == 3) ? 2 : (STAGES == 5) ? 3 : 5;

  initial begin
    assert (STAGES == 3 || STAGES == 5 || STAGES == 7)
      else $fatal(1, "mt_core: STAGES must be 3, 5 or 7");
    assert (THREADS >= MIN_THREADS)
      else $fatal(1, "mt_core: %0d-stage pipeline needs at least %0d threads", STAGES, MIN_THREADS);
  end

  typedef struct packed {
    logic          valid;
    logic [TW-1:0] tid;
    logic [31:0]   pc;
    logic [31:0]   instr;
  } slot_t;

  typedef struct packed {
    logic          valid;
    logic [TW-1:0] tid;
    logic [31:0]   pc;
    logic [31:0]   instr;
    dec_t          dec;
  } uop_t;

  // ------------------------------------------------------------------ fetch
  logic          stall;
  logic [TW-1:0] sel_tid;
  logic [31:0]   sel_pc;
  logic          redirect;
  logic [TW-1:0] redirect_tid;
  logic [31:0]   redirect_pc;
  slot_t         f;

  thread_pcs #(.THREADS(THREADS)) u_pcs (
    .clk, .rst_n, .reset_pc,
    .fetch(!stall), .sel_tid, .sel_pc,
    .redirect, .redirect_tid, .redirect_pc);

  assign imem_en   = !stall;
  assign imem_addr = sel_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f.valid <= 1'b0;
      f.tid   <= '0;
      f.pc    <= '0;
    end else if (!stall) begin
      f.valid <= 1'b1;
      f.tid   <= sel_tid;
      f.pc    <= sel_pc;
    end
  end
  assign f.instr = imem_data;

  // ----------------------------------------------------------------- decode
  slot_t d;
  dec_t  d_dec;

  if (HAS_IR) begin : g_ir
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) d <= '0;
      else        d <= f;
    end
  end else begin : g_no_ir
    assign d = f;
  end

  decoder u_dec (.instr(d.instr), .dec(d_dec));

  logic [31:0] rf_rd1, rf_rd2;
  logic        rf_we;
  logic [TW-1:0] rf_wtid;
  logic [4:0]  rf_wa;
  logic [31:0] rf_wd;

  mt_regfile #(.THREADS(THREADS), .NUM_REGS(NUM_REGS)) u_rf (
    .clk, .re(1'b1), .rtid(d.tid), .ra1(d_dec.rs), .ra2(d_dec.rt),
    .rd1(rf_rd1), .rd2(rf_rd2),
    .we(rf_we), .wtid(rf_wtid), .wa(rf_wa), .wd(rf_wd));

  // ------------------------------------------------- operand read (R) stage
  uop_t        e;
  logic [31:0] e_rs, e_rt;

  if (HAS_R) begin : g_r
    uop_t r;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r <= '0;
        e <= '0;
      end else begin
        r <= '{valid: d.valid, tid: d.tid, pc: d.pc, instr: d.instr, dec: d_dec};
        e <= r;
      end
    end
    always_ff @(posedge clk) begin
      e_rs <= rf_rd1;
      e_rt <= rf_rd2;
    end
  end else begin : g_no_r
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) e <= '0;
      else        e <= '{valid: d.valid && !stall, tid: d.tid, pc: d.pc,
                         instr: d.instr, dec: d_dec};
    end
    assign e_rs = rf_rd1;
    assign e_rt = rf_rd2;
  end

  // ---------------------------------------------------------------- execute
  logic [31:0] op_b, alu_y, br_target, br_link, sh_y, mul_y, e_result;
  logic        br_taken;

  assign op_b = e.dec.use_imm ? e.dec.imm : e_rt;

  alu u_alu (.op(e.dec.alu_op), .a(e_rs), .b(op_b), .y(alu_y));

  branch_unit u_br (
    .cond(e.dec.br_cond), .jump_reg(e.dec.jump_reg), .jump_abs(e.dec.jump_abs),
    .pc(e.pc), .instr(e.instr), .rs_val(e_rs), .rt_val(e_rt),
    .taken(br_taken), .target(br_target), .link(br_link));

  shifter #(.USE_MULTIPLIER(SHIFT_MULT), .LATENCY(UNIT_LAT)) u_shift (
    .clk, .op(e.dec.shift_op), .a(e_rt),
    .sa(e.dec.shift_var ? e_rs[4:0] : e.dec.shamt), .y(sh_y));

  multiplier #(.LATENCY(UNIT_LAT)) u_mul (
    .clk, .a(e_rs), .b(e_rt), .high(e.dec.mul_high), .y(mul_y));

  assign redirect     = e.valid && br_taken;
  assign redirect_tid = e.tid;
  assign redirect_pc  = br_target;

  always_comb begin
    unique case (e.dec.res_sel)
      RES_LINK:  e_result = br_link;
      RES_SHIFT: e_result = (UNIT_LAT == 0) ? sh_y  : alu_y;
      RES_MUL:   e_result = (UNIT_LAT == 0) ? mul_y : alu_y;
      default:   e_result = alu_y;
    endcase
  end

  // ------------------------------------------- E2 (7-stage) and data memory
  uop_t        mi;          // instruction sent towards M
  logic [31:0] mi_result;   // its result so far

  if (HAS_E2) begin : g_e2
    uop_t        e2;
    logic [31:0] e2_result, e2_addr, e2_sdata;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) e2 <= '0;
      else        e2 <= e;
    end
    always_ff @(posedge clk) begin
      e2_result <= e_result;
      e2_addr   <= alu_y;
      e2_sdata  <= e_rt;
    end
    assign dmem_re       = e2.valid && e2.dec.mem_read;
    assign dmem_we       = e2.valid && e2.dec.mem_write;
    assign dmem_tid      = e2.tid;
    assign dmem_addr     = e2_addr;
    assign dmem_size     = e2.dec.mem_size;
    assign dmem_unsigned = e2.dec.mem_unsigned;
    assign dmem_wdata    = e2_sdata;
    assign mi            = e2;
    assign mi_result     = (e2.dec.res_sel == RES_SHIFT) ? sh_y :
                           (e2.dec.res_sel == RES_MUL)   ? mul_y : e2_result;
  end else begin : g_no_e2
    assign dmem_re       = e.valid && e.dec.mem_read;
    assign dmem_we       = e.valid && e.dec.mem_write;
    assign dmem_tid      = e.tid;
    assign dmem_addr     = alu_y;
    assign dmem_size     = e.dec.mem_size;
    assign dmem_unsigned = e.dec.mem_unsigned;
    assign dmem_wdata    = e_rt;
    assign mi            = e;
    assign mi_result     = e_result;
  end

  // ----------------------------------------------------------------- memory
  // In the 3-stage pipeline only long instructions enter M.
  uop_t        m;
  logic [31:0] m_result_q, m_result;
  logic        to_m;

  assign to_m = mi.valid && ((STAGES != 3) || is_long(mi.dec));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m <= '0;
    else begin
      m       <= mi;
      m.valid <= to_m;
    end
  end
  always_ff @(posedge clk) m_result_q <= mi_result;

  always_comb begin
    m_result = m_result_q;
    if (m.dec.res_sel == RES_LOAD) m_result = dmem_rdata;
    else if (STAGES == 3 && m.dec.res_sel == RES_SHIFT) m_result = sh_y;
    else if (STAGES == 3 && m.dec.res_sel == RES_MUL)   m_result = mul_y;
  end

  // ------------------------------------------------------------- write-back
  uop_t        w;
  logic [31:0] w_result;
  logic        short_to_w;

  assign short_to_w = (STAGES == 3) && e.valid && !is_long(e.dec);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w <= '0;
    else if (m.valid) w <= m;
    else if (short_to_w) w <= e;
    else w.valid <= 1'b0;
  end
  always_ff @(posedge clk) w_result <= m.valid ? m_result : e_result;

  assign rf_we   = w.valid && w.dec.reg_write;
  assign rf_wtid = w.tid;
  assign rf_wa   = w.dec.rd;
  assign rf_wd   = w_result;

  assign retire       = w.valid;
  assign retire_tid   = w.tid;
  assign retire_pc    = w.pc;
  assign retire_instr = w.instr;

  // ------------------------------------------------------------------ stall
  // 3-stage only: hold F when a short instruction would follow a long one
  // into W, or (with 2 threads) while its own thread has a long op in M.
  if (STAGES == 3) begin : g_stall
    dec_t f_dec;
    assign f_dec = d_dec;   // F and D are the same stage here
    assign stall = f.valid && (
                     (!is_long(f_dec) && e.valid && is_long(e.dec)) ||
                     (THREADS < 3 && m.valid && is_long(m.dec) && m.tid == f.tid));
  end else begin : g_no_stall
    assign stall = 1'b0;
  end

  assign ev_stall     = stall;
  assign ev_redirect  = redirect;
  assign ev_pc_bypass = redirect && !stall && (redirect_tid == sel_tid);

  // Only one instruction may reach write-back per cycle.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(m.valid && short_to_w))
      else $error("mt_core: write-back conflict");
  end
endmodule
