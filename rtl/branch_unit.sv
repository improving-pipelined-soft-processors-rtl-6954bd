// branch_unit: decides whether a branch or jump is taken and computes its
// target.
//
// There are no delay slots, so conditional branches go to PC+4+(offset<<2),
// J/JAL to {PC+4[31:28], index, 2'b00} and JR/JALR to the register value; the
// link value for JAL/JALR is PC+4. The pipeline resolves every control
// transfer in its execute stage and redirects only the program counter of the
// thread that executed it, so no other thread is affected and nothing is
// flushed. Combinational.
module branch_unit
  import mt_pkg::*;
(
  input  br_cond_e    cond,
  input  logic        jump_reg,
  input  logic        jump_abs,
  input  logic [31:0] pc,
  input  logic [31:0] instr,
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  output logic        taken,
  output logic [31:0] target,
  output logic [31:0] link
);
  logic [31:0] pc4;
  assign pc4  = pc + 32'd4;
  assign link = pc4;

  always_comb begin
    unique case (cond)
      BR_EQ:     taken = (rs_val == rt_val);
      BR_NE:     taken = (rs_val != rt_val);
      BR_LEZ:    taken = $signed(rs_val) <= 0;
      BR_GTZ:    taken = $signed(rs_val) > 0;
      BR_LTZ:    taken = rs_val[31];
      BR_GEZ:    taken = !rs_val[31];
      BR_ALWAYS: taken = 1'b1;
      default:   taken = 1'b0;
    endcase
    if (jump_reg)      target = rs_val;
    else if (jump_abs) target = {pc4[31:28], instr[25:0], 2'b00};
    else               target = pc4 + {{14{instr[15]}}, instr[15:0], 2'b00};
  end
endmodule
