// multiplier: 3-operand 32x32 multiply returning either the lower 32 bits
// (MUL) or the upper 32 bits of the signed product (MULH) straight to the
// register file, so no Hi/Lo registers have to be replicated per thread.
//
// LATENCY = 0 gives a single-cycle combinational multiplier (used by the
// 5-stage pipeline, whose multicycle paths are made single-cycle).
// LATENCY = 1 registers the 64-bit product once, splitting the multiply over
// the execute and the following stage (used by the 3-stage pipeline, where
// this path is pipelined, and by the 7-stage pipeline). The register has no
// enable: the pipelines never hold an instruction in that stage.
module multiplier #(
  parameter int unsigned LATENCY = 0
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        high,     // select the upper word (registered with the product)
  output logic [31:0] y
);
  logic signed [63:0] prod;
  assign prod = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});

  if (LATENCY == 0) begin : g_comb
    assign y = high ? prod[63:32] : prod[31:0];
  end else begin : g_reg
    logic [63:0] prod_q;
    logic        high_q;
    always_ff @(posedge clk) begin
      prod_q <= prod;
      high_q <= high;
    end
    assign y = high_q ? prod_q[63:32] : prod_q[31:0];
  end
endmodule
