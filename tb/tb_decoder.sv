// tb_decoder: decodes one instruction of each class and checks the control
// fields that matter for it.
module tb_decoder;
  import mt_pkg::*;
  import mips_asm_pkg::*;
  logic [31:0] instr;
  dec_t        d;
  int checks = 0, failures = 0;
  decoder dut (.instr, .dec(d));

  task automatic chk(string n, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (instr %h): %h expected %h", n, instr, got, exp);
    end
  endtask

  initial begin
    instr = ADDU(3, 1, 2); #1;
    chk("addu valid", 32'(d.valid), 1); chk("addu rd", 32'(d.rd), 3); chk("addu we", 32'(d.reg_write), 1);
    chk("addu op", 32'(d.alu_op), 32'(ALU_ADD)); chk("addu rs", 32'(d.rs), 1); chk("addu rt", 32'(d.rt), 2);
    instr = SUBU(0, 1, 2); #1;
    chk("r0 no write", 32'(d.reg_write), 0);
    instr = MUL(5, 6, 7); #1;
    chk("mul sel", 32'(d.res_sel), 32'(RES_MUL)); chk("mul high", 32'(d.mul_high), 0); chk("mul rd", 32'(d.rd), 5);
    instr = MULH(5, 6, 7); #1;
    chk("mulh high", 32'(d.mul_high), 1);
    instr = SRA(4, 9, 13); #1;
    chk("sra sel", 32'(d.res_sel), 32'(RES_SHIFT)); chk("sra op", 32'(d.shift_op), 32'(SH_SRA));
    chk("sra shamt", 32'(d.shamt), 13); chk("sra var", 32'(d.shift_var), 0);
    instr = SLLV(4, 9, 10); #1;
    chk("sllv var", 32'(d.shift_var), 1);
    instr = ADDIU(8, 9, -2); #1;
    chk("addiu imm", d.imm, 32'hFFFF_FFFE); chk("addiu rd", 32'(d.rd), 8); chk("addiu useimm", 32'(d.use_imm), 1);
    instr = ORI(8, 9, 'hF00F); #1;
    chk("ori zext", d.imm, 32'h0000_F00F); chk("ori op", 32'(d.alu_op), 32'(ALU_OR));
    instr = LUI(8, 'h1234); #1;
    chk("lui op", 32'(d.alu_op), 32'(ALU_LUI));
    instr = LHU(7, 6, 5); #1;
    chk("lhu read", 32'(d.mem_read), 1); chk("lhu size", 32'(d.mem_size), 32'(MEM_H));
    chk("lhu uns", 32'(d.mem_unsigned), 1); chk("lhu sel", 32'(d.res_sel), 32'(RES_LOAD));
    instr = SB(7, 6, 5); #1;
    chk("sb write", 32'(d.mem_write), 1); chk("sb size", 32'(d.mem_size), 32'(MEM_B)); chk("sb no reg", 32'(d.reg_write), 0);
    instr = BNE(1, 2, 5); #1;
    chk("bne cond", 32'(d.br_cond), 32'(BR_NE)); chk("bne no reg", 32'(d.reg_write), 0);
    instr = BGEZ(1, 5); #1;
    chk("bgez cond", 32'(d.br_cond), 32'(BR_GEZ));
    instr = JAL(100); #1;
    chk("jal rd", 32'(d.rd), 31); chk("jal link", 32'(d.res_sel), 32'(RES_LINK)); chk("jal abs", 32'(d.jump_abs), 1);
    instr = JR(31); #1;
    chk("jr reg", 32'(d.jump_reg), 1); chk("jr nowrite", 32'(d.reg_write), 0); chk("jr always", 32'(d.br_cond), 32'(BR_ALWAYS));
    instr = 32'hFC00_0000; #1;
    chk("invalid", 32'(d.valid), 0); chk("invalid nowrite", 32'(d.reg_write), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
