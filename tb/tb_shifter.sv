// tb_shifter: compares the multiplier-based shifter (combinational and
// registered) and the barrel shifter with SV shift operators for every
// shift kind and every shift amount 0..31.
module tb_shifter;
  import mt_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  shift_op_e   op;
  logic [31:0] a, ym0, ym1, yb;
  logic [4:0]  sa;
  int checks = 0, failures = 0;

  shifter #(.USE_MULTIPLIER(1'b1), .LATENCY(0)) u_m0 (.clk, .op, .a, .sa, .y(ym0));
  shifter #(.USE_MULTIPLIER(1'b1), .LATENCY(1)) u_m1 (.clk, .op, .a, .sa, .y(ym1));
  shifter #(.USE_MULTIPLIER(1'b0), .LATENCY(0)) u_b  (.clk, .op, .a, .sa, .y(yb));

  function automatic logic [31:0] model(shift_op_e o, logic [31:0] x, int s);
    logic signed [31:0] xs;
    xs = x;
    case (o)
      SH_SLL:  return x << s;
      SH_SRL:  return x >> s;
      default: return xs >>> s;
    endcase
  endfunction

  task automatic chk(string n, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op %0d a %h sa %0d: %h expected %h", n, op, a, sa, got, exp);
    end
  endtask

  initial begin
    logic [31:0] e;
    shift_op_e ops [3] = '{SH_SLL, SH_SRL, SH_SRA};
    @(negedge clk);
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 3; k++)
        for (int s = 0; s < 32; s++) begin
          op = ops[k]; sa = 5'(s);
          a = (r == 0) ? 32'h8000_0001 : (r == 1 ? 32'h7FFF_FFFF : $urandom());
          #1;
          e = model(op, a, s);
          chk("mult", ym0, e);
          chk("barrel", yb, e);
          @(negedge clk);
          chk("mult-reg", ym1, e);
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
