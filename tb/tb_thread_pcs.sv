// tb_thread_pcs: checks reset addresses, round-robin selection, the +4
// advance, holding when fetch is low, a redirect, and the redirect target
// forwarded to the fetch address when the redirected thread is the one
// being selected. Uses 5 threads.
module tb_thread_pcs;
  localparam int T = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n = 1'b0, fetch = 1'b0, redirect = 1'b0;
  logic [31:0] reset_pc [T];
  logic [2:0]  sel_tid, redirect_tid = '0;
  logic [31:0] sel_pc, redirect_pc = '0;
  logic [31:0] model [T];
  int checks = 0, failures = 0;

  thread_pcs #(.THREADS(T)) dut (.clk, .rst_n, .reset_pc, .fetch, .sel_tid, .sel_pc,
                                 .redirect, .redirect_tid, .redirect_pc);

  task automatic chk(string n, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", n, got, exp);
    end
  endtask

  initial begin
    int exp_tid;
    for (int t = 0; t < T; t++) begin
      reset_pc[t] = 32'h100 * t;
      model[t] = reset_pc[t];
    end
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    exp_tid = 0;
    for (int c = 0; c < 40; c++) begin
      fetch = (c % 9 != 4);
      redirect = (c % 7 == 3);
      redirect_tid = 3'((exp_tid + 2) % T);
      if (c == 20) redirect_tid = 3'(exp_tid);   // forwarding case
      redirect_pc = 32'h8000 + 32'(c * 16);
      #1;
      chk("sel_tid", 32'(sel_tid), 32'(exp_tid));
      if (redirect && redirect_tid == 3'(exp_tid))
        chk("forwarded pc", sel_pc, redirect_pc);
      else
        chk("sel_pc", sel_pc, model[exp_tid]);
      @(negedge clk);
      if (redirect) model[redirect_tid] = redirect_pc;
      if (fetch) begin
        model[exp_tid] = ((redirect && redirect_tid == 3'(exp_tid)) ? redirect_pc : model[exp_tid]) + 4;
        exp_tid = (exp_tid + 1) % T;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
