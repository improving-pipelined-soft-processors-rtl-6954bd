// wl_run: runs one workload on one processor configuration and checks it.
//
// A workload is either several copies of one kernel (one thread each, all
// sharing one instruction range, each with its own data range) or a
// multiprogrammed mix, where thread t runs kernel (t + MIX_ROT) mod 3. The
// three kernels are small stand-ins, written here, for the three kinds of
// embedded program the processor was tuned for:
//   0  bubble sort of 16 signed words        (dominated by loads)
//   1  bitwise CRC-32 over 8 words            (dominated by shifts)
//   2  8-tap FIR filter giving 16 outputs     (dominated by multiplies)
// Kernel k sits at instruction word 256*k. Every kernel leaves its result in
// its thread's data range, stores a done flag in word 63 and then jumps to
// itself. A thread counts as finished when it retires that self-jump.
//
// The run is measured the way multiprogrammed mixes are usually measured:
// from reset until the first thread finishes (the shortest program in the
// workload). Over that window every cycle after the first retirement must
// either retire an instruction or be a stall cycle, and the 5- and 7-stage
// pipelines must not stall at all. After every thread has finished, each
// thread's results are read through the data memory's host port and
// compared with a model computed here. KERNEL = 0..2 selects copies of that
// kernel; KERNEL = 3 selects the mix. The kernels use no register between r16
// and r22, so they also run on the reduced 25-register file.
module wl_run
  import mips_asm_pkg::*;
#(
  parameter int unsigned STAGES   = 3,
  parameter int unsigned THREADS  = 3,
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned KERNEL   = 3,
  parameter int unsigned MIX_ROT  = 0,
  parameter int unsigned TIMEOUT  = 40000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_cycles,
  output int   n_retired,
  output int   n_stalls,
  output int   n_pairs
);
  // set once the run is over
  logic fin = 1'b0;
  assign done = fin;

  localparam int unsigned IMEM_WORDS = 1024;
  localparam int unsigned DMEM_WORDS = 1024;
  localparam int unsigned TW    = (THREADS <= 1) ? 1 : $clog2(THREADS);
  localparam int unsigned IAW   = $clog2(IMEM_WORDS);
  localparam int unsigned DAW   = $clog2(DMEM_WORDS);
  localparam int unsigned RANGE = DMEM_WORDS / (1 << TW);

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

  mt_processor #(.STAGES(STAGES), .THREADS(THREADS), .NUM_REGS(NUM_REGS),
                 .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_dut (
    .clk, .rst_n, .reset_pc,
    .imem_load_we, .imem_load_addr, .imem_load_data,
    .dmem_host_we, .dmem_host_addr, .dmem_host_wdata, .dmem_host_rdata,
    .retire, .retire_tid, .retire_pc, .retire_instr,
    .ev_stall, .ev_redirect, .ev_pc_bypass);

  function automatic int kernel_of(int t);
    return (KERNEL == 3) ? int'((t + MIX_ROT) % 3) : int'(KERNEL);
  endfunction

  // ------------------------------------------------------------ kernels
  logic [31:0] prog [$];
  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction
  // branch offset from the next instruction to word index 'to'
  function automatic int rel(int to); return to - (prog.size() + 1); endfunction

  function automatic void finish(int base);
    emit(ADDIU(15, 0, 1));
    emit(SW(15, 252, 0));
    emit(J(base + prog.size()));
  endfunction

  // Bubble sort of words 0..15 in place, ascending (signed).
  function automatic void build_sort(int base);
    int outer, inner;
    prog.delete();
    emit(ADDIU(1, 0, 15));
    outer = prog.size();
    emit(ADDU(2, 0, 0));
    emit(SLL(5, 1, 2));
    inner = prog.size();
    emit(LW(3, 0, 2));
    emit(LW(4, 4, 2));
    emit(SLT(6, 4, 3));
    emit(BEQ(6, 0, 2));
    emit(SW(4, 0, 2));
    emit(SW(3, 4, 2));
    emit(ADDIU(2, 2, 4));
    emit(BNE(2, 5, rel(inner)));
    emit(ADDIU(1, 1, -1));
    emit(BGTZ(1, rel(outer)));
    finish(base);
  endfunction

  // Reflected CRC-32 (initial value and final complement all ones) over
  // words 16..23, least significant bit first; result in word 32.
  function automatic void build_crc(int base);
    int wl, bl;
    prog.delete();
    emit(LUI(10, 'hEDB8));
    emit(ORI(10, 10, 'h8320));
    emit(ADDIU(3, 0, -1));
    emit(ADDIU(2, 0, 64));
    emit(ADDIU(5, 0, 96));
    wl = prog.size();
    emit(LW(4, 0, 2));
    emit(XOR_(3, 3, 4));
    emit(ADDIU(6, 0, 32));
    bl = prog.size();
    emit(SLL(7, 3, 31));
    emit(SRA(7, 7, 31));
    emit(SRL(3, 3, 1));
    emit(AND_(7, 7, 10));
    emit(XOR_(3, 3, 7));
    emit(ADDIU(6, 6, -1));
    emit(BNE(6, 0, rel(bl)));
    emit(ADDIU(2, 2, 4));
    emit(BNE(2, 5, rel(wl)));
    emit(NOR_(3, 3, 0));
    emit(SW(3, 128, 0));
    finish(base);
  endfunction

  // y[n] = sum_{k<8} h[k]*x[n+k] for n = 0..15, with x in words 0..23,
  // h in words 24..31 and y in words 32..47 (low 32 bits of each product).
  function automatic void build_fir(int base);
    int ol, il;
    prog.delete();
    emit(ADDU(1, 0, 0));
    emit(ADDIU(9, 0, 64));
    ol = prog.size();
    emit(ADDU(3, 0, 0));
    emit(ADDU(4, 1, 0));
    emit(ADDIU(5, 0, 96));
    emit(ADDIU(6, 0, 128));
    il = prog.size();
    emit(LW(7, 0, 4));
    emit(LW(8, 0, 5));
    emit(MUL(7, 7, 8));
    emit(ADDU(3, 3, 7));
    emit(ADDIU(4, 4, 4));
    emit(ADDIU(5, 5, 4));
    emit(BNE(5, 6, rel(il)));
    emit(SW(3, 128, 1));
    emit(ADDIU(1, 1, 4));
    emit(BNE(1, 9, rel(ol)));
    finish(base);
  endfunction

  // --------------------------------------------------- reference results
  typedef struct { int unsigned word; logic [31:0] val; } exp_t;

  task automatic expected(int k, input logic [31:0] in [32], ref exp_t e [$]);
    logic [31:0] a [16];
    logic [31:0] crc, y;
    e.delete();
    case (k)
      0: begin
        // insertion sort, signed
        for (int i = 0; i < 16; i++) begin
          int j;
          j = i;
          while (j > 0 && $signed(a[j-1]) > $signed(in[i])) begin
            a[j] = a[j-1];
            j--;
          end
          a[j] = in[i];
        end
        for (int i = 0; i < 16; i++) e.push_back('{i, a[i]});
      end
      1: begin
        crc = '1;
        for (int w = 16; w < 24; w++) begin
          crc ^= in[w];
          for (int b = 0; b < 32; b++) crc = crc[0] ? ((crc >> 1) ^ 32'hEDB88320) : (crc >> 1);
        end
        e.push_back('{32, ~crc});
      end
      default: begin
        for (int n = 0; n < 16; n++) begin
          y = '0;
          for (int j = 0; j < 8; j++) y += in[24 + j] * in[n + j];
          e.push_back('{32 + n, y});
        end
      end
    endcase
    e.push_back('{63, 32'd1});
  endtask

  // ------------------------------------------------------------ measures
  int   cycle = 0, first_done_cycle = -1, n_finished = 0;
  int   win_cycles = 0, win_retire = 0, win_stall = 0, n_long_pairs = 0;
  assign n_cycles  = win_cycles;
  assign n_retired = win_retire;
  assign n_stalls  = win_stall;
  assign n_pairs   = n_long_pairs;
  logic started = 1'b0;
  // A stall holds F; its bubble reaches write-back STAGES-1 cycles later.
  // The window counts the delayed event, so that it lines up with the
  // missing retirement.
  logic [7:0] stall_hist = '0;
  logic       stall_at_w;
  assign stall_at_w = stall_hist[STAGES-2];
  logic finished [THREADS] = '{default: 1'b0};

  function automatic logic long_op(logic [31:0] i);
    return (i[31:26] == 6'h00 && (i[5:0] inside {6'h00, 6'h02, 6'h03, 6'h04, 6'h06, 6'h07, 6'h18, 6'h19}) && i != 0)
        || (i[31:29] == 3'b100);
  endfunction
  logic prev_long = 1'b0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      stall_hist <= {stall_hist[6:0], ev_stall};
      if (retire) started <= 1'b1;
      // window: from the first retirement until the first thread finishes
      if ((started || retire) && first_done_cycle < 0) begin
        win_cycles <= win_cycles + 1;
        if (retire)   win_retire <= win_retire + 1;
        if (stall_at_w) win_stall <= win_stall + 1;
      end
      if (retire) begin
        prev_long <= long_op(retire_instr);
        if (prev_long && long_op(retire_instr)) n_long_pairs <= n_long_pairs + 1;
        if (retire_instr[31:26] == 6'h02 && {retire_pc[31:28], retire_instr[25:0], 2'b00} == retire_pc
            && !finished[retire_tid]) begin
          finished[retire_tid] <= 1'b1;
          n_finished <= n_finished + 1;
          if (first_done_cycle < 0) first_done_cycle <= cycle;
        end
      end
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
    @(negedge clk);
    v = dmem_host_rdata;
  endtask

  function automatic void check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endfunction

  logic [31:0] inputs [THREADS][32];
  string       name;

  initial begin
    exp_t e [$];
    logic [31:0] v;
    checks = 0; failures = 0;
    name = (KERNEL == 3) ? $sformatf("S%0d T%0d R%0d mix%0d", STAGES, THREADS, NUM_REGS, MIX_ROT)
                         : $sformatf("S%0d T%0d R%0d copies of kernel %0d", STAGES, THREADS, NUM_REGS, KERNEL);
    for (int k = 0; k < 3; k++) begin
      case (k)
        0: build_sort(256 * k);
        1: build_crc(256 * k);
        default: build_fir(256 * k);
      endcase
      for (int i = 0; i < prog.size(); i++) begin
        @(negedge clk);
        imem_load_we = 1'b1; imem_load_addr = IAW'(256 * k + i); imem_load_data = prog[i];
      end
    end
    @(negedge clk);
    imem_load_we = 1'b0;
    for (int t = 0; t < THREADS; t++) begin
      reset_pc[t] = 32'(1024 * kernel_of(t));
      for (int w = 0; w < 64; w++) begin
        v = (w < 32) ? $urandom() : 32'h0;
        if (w < 32) inputs[t][w] = v;
        host_write(t * RANGE + w, v);
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (n_finished == THREADS);
    repeat (10) @(posedge clk);
    for (int t = 0; t < THREADS; t++) begin
      expected(kernel_of(t), inputs[t], e);
      foreach (e[i]) begin
        host_read(t * RANGE + e[i].word, v);
        check($sformatf("%s thread %0d word %0d", name, t, e[i].word), v, e[i].val);
      end
    end
    checks++;
    if (win_retire + win_stall != win_cycles) begin
      failures++;
      $display("FAIL %s: %0d cycles, %0d retired, %0d stalls", name, win_cycles, win_retire, win_stall);
    end
    if (STAGES != 3) begin
      checks++;
      if (win_stall != 0 || win_retire != win_cycles) begin
        failures++;
        $display("FAIL %s: IPC below 1 (%0d/%0d)", name, win_retire, win_cycles);
      end
    end
    $display("%s: shortest program done after %0d cycles, IPC %0d/%0d = %0.3f, stalls %0d, long pairs %0d",
             name, first_done_cycle, win_retire, win_cycles,
             real'(win_retire) / real'(win_cycles), win_stall, n_long_pairs);
    fin = 1'b1;
  end

  initial begin
    repeat (TIMEOUT) @(posedge clk);
    if (!done) begin
      $display("FAIL %s: only %0d of %0d threads finished", name, n_finished, THREADS);
      failures++;
      fin = 1'b1;
    end
  end
endmodule
