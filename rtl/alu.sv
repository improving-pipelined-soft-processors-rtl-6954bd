// alu: 32-bit integer arithmetic and logic unit for the MIPS I subset.
//
// Computes add, subtract, the four logic operations, signed and unsigned
// set-less-than, LUI (immediate moved to the upper half) and a pass of
// operand B. Add and subtract wrap; no overflow trap is raised (the design
// models no exceptions). Combinational, result valid in the same cycle.
module alu
  import mt_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOR:   y = ~(a | b);
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_LUI:   y = {b[15:0], 16'h0};
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
