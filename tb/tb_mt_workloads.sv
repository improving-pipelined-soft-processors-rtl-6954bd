// tb_mt_workloads: runs small embedded kernels on the processor as
// multiprogrammed mixes and as copies of one program, and checks results and
// cycle accounting for each (see wl_run for the kernels and the measurement).
//
// Configurations:
//   3 stages, 3 threads: copies of each of the three kernels, and the mix
//                        in all three rotations
//   3 stages, 2 threads: a mix (one thread fewer than stages)
//   5 stages, 5 threads: copies of the CRC kernel, and a mix
//   5 stages, 5 threads, 25 registers per thread: a mix
//   7 stages, 7 threads: a mix
//   7 stages, 6 threads: a mix
// Every configuration must produce correct results in every thread. The 5-
// and 7-stage pipelines must retire one instruction per cycle. The 3-stage
// pipeline may stall, when a short instruction directly follows a long one
// (load, shift or multiply); the test requires that this happened, and that
// long instructions also ran back to back. The IPC of each run is printed, so
// that copies and mixes can be compared: copies of one program tend to line
// long instructions up and stall less than mixes.
module tb_mt_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 12;
  localparam int unsigned ST [N] = '{3, 3, 3, 3, 3, 3, 3, 5, 5, 5, 7, 7};
  localparam int unsigned TH [N] = '{3, 3, 3, 3, 3, 3, 2, 5, 5, 5, 7, 6};
  localparam int unsigned NR [N] = '{32, 32, 32, 32, 32, 32, 32, 32, 32, 25, 32, 32};
  localparam int unsigned KN [N] = '{0, 1, 2, 3, 3, 3, 3, 1, 3, 3, 3, 3};
  localparam int unsigned RT [N] = '{0, 0, 0, 0, 1, 2, 1, 0, 0, 2, 1, 2};

  logic done     [N];
  int   checks   [N];
  int   failures [N];
  int   cycles   [N];
  int   retired  [N];
  int   stalls   [N];
  int   pairs    [N];

  for (genvar i = 0; i < N; i++) begin : g_run
    wl_run #(.STAGES(ST[i]), .THREADS(TH[i]), .NUM_REGS(NR[i]), .KERNEL(KN[i]),
             .MIX_ROT(RT[i])) u_run (
      .clk, .done(done[i]), .checks(checks[i]), .failures(failures[i]),
      .n_cycles(cycles[i]), .n_retired(retired[i]), .n_stalls(stalls[i]),
      .n_pairs(pairs[i]));
  end

  int total_checks = 0, total_failures = 0;

  int s3_stalls = 0, s3_pairs = 0;

  initial begin
    repeat (2) @(posedge clk);  // let start-up values settle
    for (int i = 0; i < N; i++) wait (done[i]);
    for (int i = 0; i < N; i++) begin
      total_checks   += checks[i];
      total_failures += failures[i];
      if (ST[i] == 3) begin
        s3_stalls += stalls[i];
        s3_pairs  += pairs[i];
      end
    end
    total_checks += 2;
    if (s3_stalls == 0) begin
      total_failures++;
      $display("FAIL: the 3-stage pipeline never stalled");
    end
    if (s3_pairs == 0) begin
      total_failures++;
      $display("FAIL: no long instructions ran back to back");
    end
    $display("3-stage totals: %0d stall cycles, %0d back-to-back long pairs", s3_stalls, s3_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end
endmodule
