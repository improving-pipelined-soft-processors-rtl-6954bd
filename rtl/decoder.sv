// decoder: combinational decode of one 32-bit instruction of the modified
// MIPS I subset into the control bundle mt_pkg::dec_t.
//
// The ISA follows MIPS I with the changes made for fine-grained
// multithreading: branches and jumps take effect immediately (no delay
// slot), loads have no delay slot, there are no Hi/Lo registers and the
// multiply is a 3-operand instruction (MUL for the low word, MULH for the
// signed high word). JAL/JALR link PC+4, because there is no delay slot.
// ADD/ADDI/SUB do not trap on overflow (no exceptions are modelled), which is
// this design's choice. Unknown opcodes decode as a no-op with valid = 0.
// Purely combinational: instr in, dec out in the same cycle.
module decoder
  import mt_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);
  logic [5:0]  op, fn;
  logic [4:0]  rs, rt, rd, sa;
  logic [31:0] simm, zimm;

  assign op   = instr[31:26];
  assign rs   = instr[25:21];
  assign rt   = instr[20:16];
  assign rd   = instr[15:11];
  assign sa   = instr[10:6];
  assign fn   = instr[5:0];
  assign simm = {{16{instr[15]}}, instr[15:0]};
  assign zimm = {16'h0, instr[15:0]};

  always_comb begin
    dec = '0;
    dec.rs       = rs;
    dec.rt       = rt;
    dec.shamt    = sa;
    dec.alu_op   = ALU_ADD;
    dec.shift_op = SH_SLL;
    dec.res_sel  = RES_ALU;
    dec.br_cond  = BR_NONE;
    dec.mem_size = MEM_W;
    unique case (op)
      OP_SPECIAL: begin
        dec.valid     = 1'b1;
        dec.rd        = rd;
        dec.reg_write = 1'b1;
        unique case (fn)
          FN_SLL:  begin dec.res_sel = RES_SHIFT; dec.shift_op = SH_SLL; end
          FN_SRL:  begin dec.res_sel = RES_SHIFT; dec.shift_op = SH_SRL; end
          FN_SRA:  begin dec.res_sel = RES_SHIFT; dec.shift_op = SH_SRA; end
          FN_SLLV: begin dec.res_sel = RES_SHIFT; dec.shift_op = SH_SLL; dec.shift_var = 1'b1; end
          FN_SRLV: begin dec.res_sel = RES_SHIFT; dec.shift_op = SH_SRL; dec.shift_var = 1'b1; end
          FN_SRAV: begin dec.res_sel = RES_SHIFT; dec.shift_op = SH_SRA; dec.shift_var = 1'b1; end
          FN_JR:   begin dec.reg_write = 1'b0; dec.rd = '0; dec.jump_reg = 1'b1; dec.br_cond = BR_ALWAYS; end
          FN_JALR: begin dec.res_sel = RES_LINK; dec.jump_reg = 1'b1; dec.br_cond = BR_ALWAYS; end
          FN_MUL:  begin dec.res_sel = RES_MUL; end
          FN_MULH: begin dec.res_sel = RES_MUL; dec.mul_high = 1'b1; end
          FN_ADD, FN_ADDU: dec.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: dec.alu_op = ALU_SUB;
          FN_AND:  dec.alu_op = ALU_AND;
          FN_OR:   dec.alu_op = ALU_OR;
          FN_XOR:  dec.alu_op = ALU_XOR;
          FN_NOR:  dec.alu_op = ALU_NOR;
          FN_SLT:  dec.alu_op = ALU_SLT;
          FN_SLTU: dec.alu_op = ALU_SLTU;
          default: begin dec.valid = 1'b0; dec.reg_write = 1'b0; dec.rd = '0; end
        endcase
      end
      OP_REGIMM: begin
        dec.valid = 1'b1;
        if (rt == RT_BLTZ)      dec.br_cond = BR_LTZ;
        else if (rt == RT_BGEZ) dec.br_cond = BR_GEZ;
        else                    dec.valid   = 1'b0;
      end
      OP_J:    begin dec.valid = 1'b1; dec.jump_abs = 1'b1; dec.br_cond = BR_ALWAYS; end
      OP_JAL:  begin dec.valid = 1'b1; dec.jump_abs = 1'b1; dec.br_cond = BR_ALWAYS;
                     dec.res_sel = RES_LINK; dec.reg_write = 1'b1; dec.rd = 5'd31; end
      OP_BEQ:  begin dec.valid = 1'b1; dec.br_cond = BR_EQ;  end
      OP_BNE:  begin dec.valid = 1'b1; dec.br_cond = BR_NE;  end
      OP_BLEZ: begin dec.valid = 1'b1; dec.br_cond = BR_LEZ; end
      OP_BGTZ: begin dec.valid = 1'b1; dec.br_cond = BR_GTZ; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        dec.valid     = 1'b1;
        dec.rd        = rt;
        dec.reg_write = 1'b1;
        dec.use_imm   = 1'b1;
        dec.imm       = simm;
        unique case (op)
          OP_SLTI:  dec.alu_op = ALU_SLT;
          OP_SLTIU: dec.alu_op = ALU_SLTU;
          OP_ANDI:  begin dec.alu_op = ALU_AND; dec.imm = zimm; end
          OP_ORI:   begin dec.alu_op = ALU_OR;  dec.imm = zimm; end
          OP_XORI:  begin dec.alu_op = ALU_XOR; dec.imm = zimm; end
          OP_LUI:   begin dec.alu_op = ALU_LUI; dec.imm = zimm; end
          default:  dec.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        dec.valid        = 1'b1;
        dec.rd           = rt;
        dec.reg_write    = 1'b1;
        dec.use_imm      = 1'b1;
        dec.imm          = simm;
        dec.mem_read     = 1'b1;
        dec.res_sel      = RES_LOAD;
        dec.mem_unsigned = (op == OP_LBU) || (op == OP_LHU);
        dec.mem_size     = (op == OP_LW) ? MEM_W :
                           ((op == OP_LH) || (op == OP_LHU)) ? MEM_H : MEM_B;
      end
      OP_SB, OP_SH, OP_SW: begin
        dec.valid     = 1'b1;
        dec.use_imm   = 1'b1;
        dec.imm       = simm;
        dec.mem_write = 1'b1;
        dec.mem_size  = (op == OP_SW) ? MEM_W : (op == OP_SH) ? MEM_H : MEM_B;
      end
      default: dec.valid = 1'b0;
    endcase
    // Writes to r0 are discarded
    if (dec.rd == 5'd0) dec.reg_write = 1'b0;
  end
endmodule
