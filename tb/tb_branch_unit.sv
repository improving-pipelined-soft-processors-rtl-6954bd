// tb_branch_unit: checks the taken decision of every branch condition on
// negative, zero and positive values, and the three target kinds
// (PC-relative, absolute index, register) and the link value.
module tb_branch_unit;
  import mt_pkg::*;
  import mips_asm_pkg::*;
  br_cond_e    cond;
  logic        jump_reg, jump_abs, taken;
  logic [31:0] pc, instr, rs_val, rt_val, target, link;
  int checks = 0, failures = 0;

  branch_unit dut (.cond, .jump_reg, .jump_abs, .pc, .instr, .rs_val, .rt_val,
                   .taken, .target, .link);

  task automatic chk(string n, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", n, got, exp);
    end
  endtask

  initial begin
    logic [31:0] vals [3] = '{32'hFFFF_FFF0, 32'h0, 32'h0000_0010};
    jump_reg = 0; jump_abs = 0; pc = 32'h0000_1000; rt_val = 32'h0000_0010;
    instr = BEQ(1, 2, -3);
    foreach (vals[i]) begin
      rs_val = vals[i];
      cond = BR_EQ;  #1 chk("beq", 32'(taken), 32'(rs_val == rt_val));
      cond = BR_NE;  #1 chk("bne", 32'(taken), 32'(rs_val != rt_val));
      cond = BR_LEZ; #1 chk("blez", 32'(taken), 32'(i <= 1));
      cond = BR_GTZ; #1 chk("bgtz", 32'(taken), 32'(i == 2));
      cond = BR_LTZ; #1 chk("bltz", 32'(taken), 32'(i == 0));
      cond = BR_GEZ; #1 chk("bgez", 32'(taken), 32'(i >= 1));
      cond = BR_NONE; #1 chk("none", 32'(taken), 32'(0));
      cond = BR_ALWAYS; #1 chk("always", 32'(taken), 32'(1));
    end
    cond = BR_EQ; #1;
    chk("rel target", target, 32'h0000_1004 - 12);
    chk("link", link, 32'h0000_1004);
    instr = J(32'h0000_0ABC); jump_abs = 1; pc = 32'h3000_0000; #1;
    chk("abs target", target, 32'h3000_0000 | (32'h0ABC << 2));
    jump_abs = 0; jump_reg = 1; rs_val = 32'h0000_2468; #1;
    chk("reg target", target, 32'h0000_2468);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
