// mt_harness: runs one multithreaded processor through a self-checking
// multithreaded program and reports the result.
//
// It loads one test program twice into instruction memory: threads 0..T-2
// share the copy at word 0 (several copies of one program) and the last
// thread runs the copy at word PROG2 (a program range of its own). Each
// thread gets its own two input words in its own data range. The program
// exercises every instruction class (ALU, immediate, MUL/MULH, constant and
// variable shifts, byte/halfword/word loads and stores, all conditional
// branches, J/JAL/JR/JALR, loops) and stores its results to its data range,
// ending with a done flag. The harness then reads every result word through
// the host port and compares it with values it computes itself.
//
// It also measures the pipeline: over a fixed window it checks that every
// cycle either retires an instruction or is a stall cycle (IPC = 1 when
// there is no stall), and counts stalls, taken branches and forwarded branch
// targets. DEFAULTS = 1 instantiates the processor without a parameter list
// (its own defaults: 5 stages, 5 threads, 32 registers, 16384-word memories);
// the other parameters must then match those defaults.
module mt_harness
  import mips_asm_pkg::*;
#(
  parameter bit          DEFAULTS   = 1'b0,
  parameter int unsigned STAGES     = 5,
  parameter int unsigned THREADS    = 5,
  parameter int unsigned NUM_REGS   = 32,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned RUN_CYCLES = 6000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_redirect,
  output int   n_bypass,
  output int   n_retire,
  output int   n_long_back_to_back
);
  // set once the run is over
  logic fin = 1'b0;
  assign done = fin;

  localparam int unsigned TW    = (THREADS <= 1) ? 1 : $clog2(THREADS);
  localparam int unsigned IAW   = $clog2(IMEM_WORDS);
  localparam int unsigned DAW   = $clog2(DMEM_WORDS);
  localparam int unsigned RANGE = DMEM_WORDS / (1 << TW);   // words per thread
  localparam int unsigned PROG2 = IMEM_WORDS / 2;           // second program copy

  logic           rst_n = 1'b0;
  logic [31:0]    reset_pc [THREADS];
  logic           imem_load_we = 1'b0;
  logic [IAW-1:0] imem_load_addr = '0;
  logic [31:0]    imem_load_data = '0;
  logic           dmem_host_we = 1'b0;
  logic [DAW-1:0] dmem_host_addr = '0;
  logic [31:0]    dmem_host_wdata = '0;
  logic [31:0]    dmem_host_rdata;
  logic           retire, ev_stall, ev_redirect, ev_pc_bypass;
  logic [TW-1:0]  retire_tid;
  logic [31:0]    retire_pc, retire_instr;

  if (DEFAULTS) begin : g_default
    mt_processor u_dut (
      .clk, .rst_n, .reset_pc,
      .imem_load_we, .imem_load_addr, .imem_load_data,
      .dmem_host_we, .dmem_host_addr, .dmem_host_wdata, .dmem_host_rdata,
      .retire, .retire_tid, .retire_pc, .retire_instr,
      .ev_stall, .ev_redirect, .ev_pc_bypass);
  end else begin : g_param
    mt_processor #(.STAGES(STAGES), .THREADS(THREADS), .NUM_REGS(NUM_REGS),
                   .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_dut (
      .clk, .rst_n, .reset_pc,
      .imem_load_we, .imem_load_addr, .imem_load_data,
      .dmem_host_we, .dmem_host_addr, .dmem_host_wdata, .dmem_host_rdata,
      .retire, .retire_tid, .retire_pc, .retire_instr,
      .ev_stall, .ev_redirect, .ev_pc_bypass);
  end

  // ------------------------------------------------------------ program
  logic [31:0] prog [$];
  int          sub_idx;   // word index (relative) of the subroutine

  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction

  // Builds the program for a copy placed at word 'base'. The JAL target and
  // the JALR address are absolute, so each copy is built for its own base.
  function automatic void build(int base);
    int loop1, loop2;
    prog.delete();
    emit(LW(1, 0, 0));            // x
    emit(LW(2, 4, 0));            // y
    emit(ADDU(3, 1, 2));   emit(SW(3, 'h40, 0));
    emit(SUBU(4, 1, 2));   emit(SW(4, 'h44, 0));
    emit(MUL(5, 1, 2));    emit(SW(5, 'h48, 0));
    emit(MULH(6, 1, 2));   emit(SW(6, 'h4C, 0));
    emit(SLL(7, 1, 5));    emit(SW(7, 'h50, 0));
    emit(SRA(8, 2, 7));    emit(SW(8, 'h54, 0));
    emit(SRL(9, 2, 7));    emit(SW(9, 'h58, 0));
    emit(ANDI(10, 2, 'hff));
    emit(SLLV(11, 1, 10)); emit(SW(11, 'h5C, 0));
    emit(SRAV(12, 2, 1));  emit(SW(12, 'h60, 0));
    emit(SRLV(13, 2, 1));  emit(SW(13, 'h64, 0));
    emit(XOR_(14, 1, 2));  emit(SW(14, 'h68, 0));
    emit(NOR_(15, 1, 2));  emit(SW(15, 'h6C, 0));
    emit(SLT(23, 1, 2));   emit(SW(23, 'h70, 0));
    emit(SLTU(24, 1, 2));  emit(SW(24, 'h74, 0));
    emit(LUI(25, 'h1234)); emit(ORI(25, 25, 'h5678)); emit(XORI(25, 25, 'h00FF));
    emit(SW(25, 'h78, 0));
    emit(SLTI(26, 1, -5)); emit(SW(26, 'h7C, 0));
    emit(SLTIU(27, 2, 100)); emit(SW(27, 'h80, 0));
    // acc = sum_{i=1..10} i*x
    emit(ADDU(28, 0, 0));
    emit(ADDIU(29, 0, 10));
    loop1 = prog.size();
    emit(MUL(30, 29, 1));
    emit(ADDU(28, 28, 30));
    emit(ADDIU(29, 29, -1));
    emit(BNE(29, 0, loop1 - (prog.size() + 1)));
    emit(SW(28, 'h84, 0));
    // 8 steps of a reflected CRC-32 on x
    emit(ADDU(3, 1, 0));
    emit(ADDIU(4, 0, 8));
    emit(LUI(5, 'hEDB8)); emit(ORI(5, 5, 'h8320));
    loop2 = prog.size();
    emit(ANDI(6, 3, 1));
    emit(SRL(3, 3, 1));
    emit(BEQ(6, 0, 1));
    emit(XOR_(3, 3, 5));
    emit(ADDIU(4, 4, -1));
    emit(BGTZ(4, loop2 - (prog.size() + 1)));
    emit(SW(3, 'h88, 0));
    // byte and halfword accesses
    emit(SB(1, 'h90, 0));
    emit(SB(2, 'h93, 0));
    emit(SH(2, 'h96, 0));
    emit(LB(7, 'h93, 0));  emit(SW(7, 'h98, 0));
    emit(LBU(8, 'h93, 0)); emit(SW(8, 'h9C, 0));
    emit(LH(9, 'h96, 0));  emit(SW(9, 'hA0, 0));
    emit(LHU(10, 'h96, 0)); emit(SW(10, 'hA4, 0));
    emit(LW(11, 'h90, 0)); emit(SW(11, 'hA8, 0));
    // subroutine call and return: r12 = 2*x + 1
    emit(ADDU(12, 1, 0));
    emit(JAL(base + sub_idx));
    emit(SW(12, 'hAC, 0));
    // conditional branches
    emit(ADDIU(13, 0, 0));
    emit(BLTZ(1, 1)); emit(ORI(13, 13, 1));
    emit(BGEZ(1, 1)); emit(ORI(13, 13, 2));
    emit(BLEZ(2, 1)); emit(ORI(13, 13, 4));
    emit(BEQ(1, 1, 1)); emit(ORI(13, 13, 8));
    emit(BNE(1, 1, 1)); emit(ORI(13, 13, 16));
    emit(SW(13, 'hB0, 0));
    // indirect call: r12 = 2*r12 + 1
    emit(ORI(14, 0, 4 * (base + sub_idx)));
    emit(JALR(31, 14));
    emit(SW(12, 'hB4, 0));
    // done flag, then spin
    emit(ADDIU(15, 0, 1));
    emit(SW(15, 'hFC, 0));
    emit(J(base + prog.size()));
    // subroutine
    if (sub_idx != 0 && sub_idx != prog.size()) $fatal(1, "subroutine index mismatch");
    emit(ADDU(12, 12, 12));
    emit(ADDIU(12, 12, 1));
    emit(JR(31));
  endfunction

  // --------------------------------------------------- reference results
  typedef struct { int unsigned off; logic [31:0] val; } exp_t;

  function automatic logic [31:0] crc8(logic [31:0] v);
    for (int i = 0; i < 8; i++) v = v[0] ? ((v >> 1) ^ 32'hEDB88320) : (v >> 1);
    return v;
  endfunction

  function automatic logic [31:0] sra(logic [31:0] v, int n);
    logic signed [31:0] sv;
    sv = v;
    return sv >>> n;
  endfunction

  task automatic expected(input logic [31:0] x, input logic [31:0] y, ref exp_t e [$]);
    logic signed [63:0] p;
    logic [31:0] w90, r12, acc, br;
    p = $signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y});
    acc = 0;
    for (int i = 1; i <= 10; i++) acc += 32'(i) * x;
    w90 = {y[7:0], 8'h00, 8'h00, x[7:0]};
    r12 = 2 * x + 1;
    br  = 32'(!x[31]) | (32'(x[31]) << 1) | (32'($signed(y) > 0) << 2) | 32'd16;
    e.delete();
    e.push_back('{'h40, x + y});
    e.push_back('{'h44, x - y});
    e.push_back('{'h48, p[31:0]});
    e.push_back('{'h4C, p[63:32]});
    e.push_back('{'h50, x << 5});
    e.push_back('{'h54, sra(y, 7)});
    e.push_back('{'h58, y >> 7});
    e.push_back('{'h5C, x << y[4:0]});
    e.push_back('{'h60, sra(y, int'(x[4:0]))});
    e.push_back('{'h64, y >> x[4:0]});
    e.push_back('{'h68, x ^ y});
    e.push_back('{'h6C, ~(x | y)});
    e.push_back('{'h70, 32'($signed(x) < $signed(y))});
    e.push_back('{'h74, 32'(x < y)});
    e.push_back('{'h78, 32'h123456 << 8 | 32'h87});
    e.push_back('{'h7C, 32'($signed(x) < -5)});
    e.push_back('{'h80, 32'(y < 100)});
    e.push_back('{'h84, acc});
    e.push_back('{'h88, crc8(x)});
    e.push_back('{'h94, {y[15:0], 16'h0}});
    e.push_back('{'h98, {{24{y[7]}}, y[7:0]}});
    e.push_back('{'h9C, {24'h0, y[7:0]}});
    e.push_back('{'hA0, {{16{y[15]}}, y[15:0]}});
    e.push_back('{'hA4, {16'h0, y[15:0]}});
    e.push_back('{'hA8, w90});
    e.push_back('{'hAC, r12});
    e.push_back('{'hB0, br});
    e.push_back('{'hB4, 2 * r12 + 1});
    e.push_back('{'hFC, 32'd1});
  endtask

  // ------------------------------------------------------------ measures
  int cycle = 0;
  logic measuring = 1'b0;
  int win_cycles = 0, win_retire = 0, win_stall = 0;
  logic [TW-1:0] last_tid;
  logic          last_valid = 1'b0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (ev_stall)     n_stall    <= n_stall + 1;
      if (ev_redirect)  n_redirect <= n_redirect + 1;
      if (ev_pc_bypass) n_bypass   <= n_bypass + 1;
      if (retire) begin
        n_retire   <= n_retire + 1;
        last_tid   <= retire_tid;
        last_valid <= 1'b1;
        // consecutive instructions always come from different threads
        if (last_valid && THREADS > 1 && retire_tid == last_tid) begin
          $display("FAIL: thread %0d retired twice in a row", retire_tid);
          failures <= failures + 1;
        end
      end
      if (measuring) begin
        win_cycles <= win_cycles + 1;
        if (retire)   win_retire <= win_retire + 1;
        if (ev_stall) win_stall  <= win_stall + 1;
      end
    end
  end

  // Count back-to-back long instructions (loads, shifts, multiplies) leaving
  // F together: the case pipelining the 3-stage multicycle path speeds up.
  function automatic logic long_op(logic [31:0] i);
    return (i[31:26] == 6'h00 && (i[5:0] inside {6'h00, 6'h02, 6'h03, 6'h04, 6'h06, 6'h07, 6'h18, 6'h19}) && i != 0)
        || (i[31:29] == 3'b100);
  endfunction
  logic prev_long = 1'b0;
  always_ff @(posedge clk) begin
    if (retire) begin
      prev_long <= long_op(retire_instr);
      if (prev_long && long_op(retire_instr)) n_long_back_to_back <= n_long_back_to_back + 1;
    end
  end

  // ------------------------------------------------------------ sequence
  task automatic host_write(int unsigned a, logic [31:0] v);
    @(negedge clk);
    dmem_host_we = 1'b1; dmem_host_addr = DAW'(a); dmem_host_wdata = v;
    @(negedge clk);
    dmem_host_we = 1'b0;
  endtask

  task automatic host_read(int unsigned a, output logic [31:0] v);
    @(negedge clk);
    dmem_host_addr = DAW'(a);
    @(negedge clk);   // address registered on the rising edge between
    v = dmem_host_rdata;
  endtask

  function automatic void check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endfunction

  logic [31:0] xs [THREADS];
  logic [31:0] ys [THREADS];

  initial begin
    exp_t e [$];
    logic [31:0] v;
    checks = 0; failures = 0;
    n_stall = 0; n_redirect = 0; n_bypass = 0; n_retire = 0; n_long_back_to_back = 0;
    // the subroutine index is fixed by a first build
    sub_idx = 0;
    void'(build_size());
    build(0);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      imem_load_we = 1'b1; imem_load_addr = IAW'(i); imem_load_data = prog[i];
    end
    build(PROG2);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      imem_load_we = 1'b1; imem_load_addr = IAW'(PROG2 + i); imem_load_data = prog[i];
    end
    @(negedge clk);
    imem_load_we = 1'b0;
    for (int t = 0; t < THREADS; t++) begin
      reset_pc[t] = (t == THREADS - 1) ? 32'(4 * PROG2) : 32'h0;
      xs[t] = $urandom();
      ys[t] = $urandom();
      if (t == 1) xs[t] = -xs[t] | 32'h8000_0000;   // exercise a negative x
      if (t == 2) ys[t] = 32'h0000_0005;             // small y: SLTIU true
      for (int o = 0; o < 64; o++) host_write(t * RANGE + o, 32'h0);
      host_write(t * RANGE + 0, xs[t]);
      host_write(t * RANGE + 1, ys[t]);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (50) @(posedge clk);
    measuring <= 1'b1;
    repeat (500) @(posedge clk);
    measuring <= 1'b0;
    repeat (RUN_CYCLES) @(posedge clk);
    // results of every thread
    for (int t = 0; t < THREADS; t++) begin
      expected(xs[t], ys[t], e);
      foreach (e[k]) begin
        host_read(t * RANGE + e[k].off / 4, v);
        check($sformatf("S%0d T%0d thread %0d word %02h", STAGES, THREADS, t, e[k].off), v, e[k].val);
      end
    end
    // every window cycle retires an instruction unless it is a stall cycle
    checks++;
    if (win_retire + win_stall != win_cycles) begin
      failures++;
      $display("FAIL S%0d T%0d: %0d cycles, %0d retired, %0d stalls",
               STAGES, THREADS, win_cycles, win_retire, win_stall);
    end
    if (STAGES != 3) begin
      checks++;
      if (win_retire != win_cycles) begin
        failures++;
        $display("FAIL S%0d T%0d: IPC below 1 (%0d/%0d)", STAGES, THREADS, win_retire, win_cycles);
      end
    end
    $display("S%0d T%0d R%0d: IPC %0d/%0d, stalls %0d, taken branches %0d, target forwards %0d, long pairs %0d",
             STAGES, THREADS, NUM_REGS, win_retire, win_cycles, n_stall, n_redirect, n_bypass,
             n_long_back_to_back);
    fin = 1'b1;
  end

  // The subroutine follows the spin loop; a dry build finds its index.
  function automatic int build_size();
    sub_idx = 0;
    build(0);
    sub_idx = prog.size() - 3;
    return sub_idx;
  endfunction
endmodule
