// tb_mt_core: runs the pipeline with testbench memories in its 3-, 5- and
// 7-stage forms (as many threads as stages). Each thread loads its own seed
// s and runs a chain in which every instruction depends on the one before
// (load -> add -> shift -> add -> multiply -> store), which is correct only
// if the thread interleaving hides every dependence. Checked: the stored
// result (5*(s+1))^2, that retirement follows strict round-robin thread
// order, that in the 5- and 7-stage forms each thread retires exactly every
// THREADS cycles (IPC 1, no stall), and that in the 3-stage form the stall
// occurs (a short instruction behind a long one). In all forms every cycle
// after the first STAGES (the pipeline fill: the first instruction retires
// in cycle STAGES) either retires an instruction or is a stall cycle.
module tb_mt_core;
  import mt_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  localparam int NCFG = 3;
  localparam int CFG_STAGES [NCFG] = '{3, 5, 7};

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int S = CFG_STAGES[g];
    localparam int T = S;
    localparam int TW = $clog2(T);
    logic [31:0]   reset_pc [T];
    logic          imem_en, dmem_re, dmem_we, dmem_unsigned;
    logic [31:0]   imem_addr, imem_data, dmem_addr, dmem_wdata, dmem_rdata;
    logic [TW-1:0] dmem_tid, retire_tid;
    mem_size_e     dmem_size;
    logic          retire, ev_stall, ev_redirect, ev_pc_bypass;
    logic [31:0]   retire_pc, retire_instr;
    logic [31:0]   imem [64];
    logic [31:0]   dmem [T][16];

    mt_core #(.STAGES(S), .THREADS(T)) dut (
      .clk, .rst_n, .reset_pc, .imem_en, .imem_addr, .imem_data,
      .dmem_re, .dmem_we, .dmem_tid, .dmem_addr, .dmem_size, .dmem_unsigned,
      .dmem_wdata, .dmem_rdata, .retire, .retire_tid, .retire_pc, .retire_instr,
      .ev_stall, .ev_redirect, .ev_pc_bypass);

    // memory models: one-cycle read latency, word accesses only
    always_ff @(posedge clk) begin
      if (imem_en) imem_data <= imem[imem_addr[7:2]];
      if (dmem_re) dmem_rdata <= dmem[dmem_tid][dmem_addr[5:2]];
      if (dmem_we) dmem[dmem_tid][dmem_addr[5:2]] <= dmem_wdata;
    end

    int cyc = 0, n_ret = 0, n_stall = 0, last_ret [T];
    logic [TW-1:0] prev_tid;
    logic          have_prev = 1'b0;
    always_ff @(posedge clk) begin
      if (rst_n) begin
        cyc <= cyc + 1;
        if (ev_stall) n_stall <= n_stall + 1;
        if (retire) begin
          n_ret <= n_ret + 1;
          have_prev <= 1'b1;
          prev_tid <= retire_tid;
          if (have_prev) begin
            checks++;
            if (32'(retire_tid) != (32'(prev_tid) + 1) % T) begin
              failures++; $display("FAIL S%0d: thread %0d after %0d", S, retire_tid, prev_tid);
            end
          end
          if (S != 3 && last_ret[retire_tid] != 0) begin
            checks++;
            if (cyc - last_ret[retire_tid] != T) begin
              failures++; $display("FAIL S%0d: thread %0d retired after %0d cycles", S, retire_tid, cyc - last_ret[retire_tid]);
            end
          end
          last_ret[retire_tid] <= cyc;
        end
      end
    end

    initial begin
      logic [31:0] seed [T];
      logic [31:0] p [$];
      for (int t = 0; t < T; t++) last_ret[t] = 0;
      p = '{LW(1, 0, 0), ADDIU(2, 1, 1), SLL(3, 2, 2), ADDU(4, 3, 2), MUL(5, 4, 4),
            SW(5, 4, 0), J(6)};
      foreach (imem[i]) imem[i] = (i < p.size()) ? p[i] : 32'h0;
      for (int t = 0; t < T; t++) begin
        reset_pc[t] = 32'h0;
        seed[t] = $urandom();
        dmem[t][0] = seed[t];
        dmem[t][1] = 32'h0;
      end
      wait (rst_n);
      repeat (40 * T) @(posedge clk);
      for (int t = 0; t < T; t++) begin
        logic [31:0] e;
        e = 32'd5 * (seed[t] + 1);
        e = e * e;
        checks++;
        if (dmem[t][1] !== e) begin
          failures++; $display("FAIL S%0d thread %0d: %h expected %h", S, t, dmem[t][1], e);
        end
      end
      checks++;
      if (cyc - n_ret - n_stall != S) begin   // only the pipeline fill is lost
        failures++; $display("FAIL S%0d: %0d cycles, %0d retired, %0d stalls", S, cyc, n_ret, n_stall);
      end
      checks++;
      if ((S == 3) != (n_stall > 0)) begin
        failures++; $display("FAIL S%0d: %0d stalls", S, n_stall);
      end
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_cnt == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
