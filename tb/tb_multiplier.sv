// tb_multiplier: checks MUL (low word) and MULH (signed high word) of the
// single-cycle and the registered multiplier, including the one-cycle
// latency of the registered one.
module tb_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y0, y1;
  logic        high;
  int checks = 0, failures = 0;

  multiplier #(.LATENCY(0)) u0 (.clk, .a, .b, .high, .y(y0));
  multiplier #(.LATENCY(1)) u1 (.clk, .a, .b, .high, .y(y1));

  function automatic logic [31:0] model(logic [31:0] x, logic [31:0] z, logic h);
    logic signed [63:0] p;
    p = $signed({{32{x[31]}}, x}) * $signed({{32{z[31]}}, z});
    return h ? p[63:32] : p[31:0];
  endfunction

  initial begin
    logic [31:0] exp_prev;
    a = 0; b = 0; high = 0;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      a = (i % 7 == 0) ? 32'hFFFF_FFFF : $urandom();
      b = (i % 5 == 0) ? 32'h8000_0000 : $urandom();
      high = i[0];
      #1;
      checks++;
      if (y0 !== model(a, b, high)) begin
        failures++; $display("FAIL comb %h*%h h%0d: %h", a, b, high, y0);
      end
      exp_prev = model(a, b, high);
      @(negedge clk);
      checks++;
      if (y1 !== exp_prev) begin
        failures++; $display("FAIL reg %h expected %h", y1, exp_prev);
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
