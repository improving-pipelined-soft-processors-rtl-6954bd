// shifter: 32-bit logical left, logical right and arithmetic right shift.
//
// USE_MULTIPLIER = 1 builds the shifter from a multiplier, as the 3- and
// 5-stage processors do: a left shift by s is the low word of a*2^s, and a
// right shift by s (s > 0) is the high word of a*2^(32-s), with a sign- or
// zero-extended to 64 bits for arithmetic or logical shifts. USE_MULTIPLIER
// = 0 builds a plain barrel shifter, as the 7-stage processor does.
// LATENCY = 1 registers the product (or the barrel result) once, so the shift
// finishes one cycle after its operands arrive; LATENCY = 0 is combinational.
module shifter
  import mt_pkg::*;
#(
  parameter bit          USE_MULTIPLIER = 1'b1,
  parameter int unsigned LATENCY        = 0
) (
  input  logic        clk,
  input  shift_op_e   op,
  input  logic [31:0] a,
  input  logic [4:0]  sa,
  output logic [31:0] y
);
  logic [63:0] part;        // product or shifted value before word select
  logic        take_high;   // result is the upper word of part

  if (USE_MULTIPLIER) begin : g_mult
    logic [5:0]         k;
    logic [63:0]        pow2;
    logic signed [63:0] a_ext;
    always_comb begin
      k         = (op == SH_SLL || sa == 5'd0) ? {1'b0, sa} : 6'd32 - {1'b0, sa};
      pow2      = 64'd1 << k;
      a_ext     = (op == SH_SRA) ? $signed({{32{a[31]}}, a}) : $signed({32'h0, a});
      take_high = (op != SH_SLL) && (sa != 5'd0);
    end
    assign part = a_ext * $signed(pow2);
  end else begin : g_barrel
    always_comb begin
      take_high = 1'b0;
      unique case (op)
        SH_SRL:  part = {32'h0, a >> sa};
        SH_SRA:  part = {32'h0, 32'($signed(a) >>> sa)};
        default: part = {32'h0, a << sa};
      endcase
    end
  end

  if (LATENCY == 0) begin : g_comb
    assign y = take_high ? part[63:32] : part[31:0];
  end else begin : g_reg
    logic [63:0] part_q;
    logic        high_q;
    always_ff @(posedge clk) begin
      part_q <= part;
      high_q <= take_high;
    end
    assign y = high_q ? part_q[63:32] : part_q[31:0];
  end
endmodule
