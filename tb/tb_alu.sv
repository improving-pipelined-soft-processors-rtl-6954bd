// tb_alu: drives the ALU with random and corner operands for every
// operation and compares with results computed here.
module tb_alu;
  import mt_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y, exp;
  int checks = 0, failures = 0;
  alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic signed [31:0] xs, zs;
    xs = x; zs = z;
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (xs < zs) ? 32'd1 : 32'd0;
      ALU_SLTU: return (x < z) ? 32'd1 : 32'd0;
      ALU_LUI:  return {z[15:0], 16'h0};
      ALU_PASSB: return z;
      default:  return 32'h0;
    endcase
  endfunction

  initial begin
    alu_op_e ops [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
                          ALU_SLT, ALU_SLTU, ALU_LUI, ALU_PASSB};
    for (int i = 0; i < 400; i++) begin
      op = ops[i % 10];
      a = (i < 40) ? 32'h8000_0000 : $urandom();
      b = (i < 20) ? 32'h0000_0001 : (i < 40 ? 32'h7FFF_FFFF : $urandom());
      #1;
      exp = model(op, a, b);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL op %0d a %h b %h: %h expected %h", op, a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
