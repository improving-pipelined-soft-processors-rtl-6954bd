// tb_mt_processor: end-to-end test of the multithreaded processor in the
// configurations the design supports: 3, 5 and 7 stages, each with as many
// threads as stages and with one thread fewer, the 5-stage one also with the
// reduced 25-register file. Every instance runs the self-checking program of
// mt_harness on all its threads (small 1024-word memories keep it short).
// Besides the results it requires that each mechanism occurred: the 3-stage
// write-back stall, taken branches in every instance, back-to-back long
// instructions passing through the pipelined 3-stage multicycle path, and
// the forwarded branch target of the 2-thread 3-stage pipeline.
module tb_mt_processor;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6;
  logic done [N];
  int   checks [N], failures [N], n_stall [N], n_redirect [N], n_bypass [N],
        n_retire [N], n_pairs [N];

  mt_harness #(.STAGES(3), .THREADS(3)) h0 (.clk, .done(done[0]), .checks(checks[0]),
    .failures(failures[0]), .n_stall(n_stall[0]), .n_redirect(n_redirect[0]),
    .n_bypass(n_bypass[0]), .n_retire(n_retire[0]), .n_long_back_to_back(n_pairs[0]));
  mt_harness #(.STAGES(3), .THREADS(2)) h1 (.clk, .done(done[1]), .checks(checks[1]),
    .failures(failures[1]), .n_stall(n_stall[1]), .n_redirect(n_redirect[1]),
    .n_bypass(n_bypass[1]), .n_retire(n_retire[1]), .n_long_back_to_back(n_pairs[1]));
  mt_harness #(.STAGES(5), .THREADS(5)) h2 (.clk, .done(done[2]), .checks(checks[2]),
    .failures(failures[2]), .n_stall(n_stall[2]), .n_redirect(n_redirect[2]),
    .n_bypass(n_bypass[2]), .n_retire(n_retire[2]), .n_long_back_to_back(n_pairs[2]));
  mt_harness #(.STAGES(5), .THREADS(4), .NUM_REGS(25)) h3 (.clk, .done(done[3]), .checks(checks[3]),
    .failures(failures[3]), .n_stall(n_stall[3]), .n_redirect(n_redirect[3]),
    .n_bypass(n_bypass[3]), .n_retire(n_retire[3]), .n_long_back_to_back(n_pairs[3]));
  mt_harness #(.STAGES(7), .THREADS(7)) h4 (.clk, .done(done[4]), .checks(checks[4]),
    .failures(failures[4]), .n_stall(n_stall[4]), .n_redirect(n_redirect[4]),
    .n_bypass(n_bypass[4]), .n_retire(n_retire[4]), .n_long_back_to_back(n_pairs[4]));
  mt_harness #(.STAGES(7), .THREADS(6)) h5 (.clk, .done(done[5]), .checks(checks[5]),
    .failures(failures[5]), .n_stall(n_stall[5]), .n_redirect(n_redirect[5]),
    .n_bypass(n_bypass[5]), .n_retire(n_retire[5]), .n_long_back_to_back(n_pairs[5]));

  int total_checks = 0, total_failures = 0;

  task automatic need(string what, logic cond);
    total_checks++;
    if (!cond) begin
      total_failures++;
      $display("FAIL: mechanism never seen: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);  // let start-up values settle
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int i = 0; i < N; i++) begin
      total_checks   += checks[i];
      total_failures += failures[i];
      need($sformatf("taken branch in instance %0d", i), n_redirect[i] > 0);
      need($sformatf("retired instructions in instance %0d", i), n_retire[i] > 0);
    end
    need("3-stage write-back stall", n_stall[0] > 0 && n_stall[1] > 0);
    need("no stall in 5- and 7-stage", n_stall[2] + n_stall[3] + n_stall[4] + n_stall[5] == 0);
    need("back-to-back long instructions (3-stage)", n_pairs[0] > 0);
    need("branch target forwarded (3-stage, 2 threads)", n_bypass[1] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end
endmodule
