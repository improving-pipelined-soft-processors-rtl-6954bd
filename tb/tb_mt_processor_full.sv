// tb_mt_processor_full: runs the processor with every parameter at its
// default (5 stages, 5 threads, 32 registers per thread, 16384-word
// instruction and data memories) through the self-checking program of
// mt_harness on all five threads, and requires IPC = 1 with no stall.
module tb_mt_processor_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done;
  int   checks, failures, n_stall, n_redirect, n_bypass, n_retire, n_pairs;

  mt_harness #(.DEFAULTS(1'b1), .STAGES(5), .THREADS(5), .NUM_REGS(32),
               .IMEM_WORDS(16384), .DMEM_WORDS(16384)) h (
    .clk, .done, .checks, .failures, .n_stall, .n_redirect, .n_bypass,
    .n_retire, .n_long_back_to_back(n_pairs));

  initial begin
    repeat (2) @(posedge clk);  // let start-up values settle
    wait (done);
    checks++;
    if (n_redirect == 0 || n_stall != 0) begin
      failures++;
      $display("FAIL: taken branches %0d, stalls %0d", n_redirect, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
