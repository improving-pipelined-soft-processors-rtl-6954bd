// tb_mt_regfile: fills the register files of all threads with random values
// and reads them back through both ports, for the full (32 registers per
// thread) and the reduced (25 registers, r16-r22 absent) organisations.
// Also checks that r0 reads zero, that threads do not see each other's
// registers, the one-cycle read latency and the write-first behaviour when
// a register is read on the edge it is written.
module tb_mt_regfile;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]  rtid, wtid;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] wd;
  logic        we;
  logic [31:0] a1, a2, b1, b2;

  mt_regfile #(.THREADS(5), .NUM_REGS(32)) u_full (.clk, .re(1'b1), .rtid, .ra1, .ra2,
    .rd1(a1), .rd2(a2), .we, .wtid, .wa, .wd);
  mt_regfile #(.THREADS(5), .NUM_REGS(25)) u_red (.clk, .re(1'b1), .rtid, .ra1, .ra2,
    .rd1(b1), .rd2(b2), .we, .wtid, .wa, .wd);

  logic [31:0] model [5][32];

  function automatic logic usable(int r);
    return r < 16 || r > 22;
  endfunction

  task automatic chk(string n, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", n, got, exp);
    end
  endtask

  initial begin
    we = 0; rtid = 0; ra1 = 0; ra2 = 0; wtid = 0; wa = 0; wd = 0;
    @(negedge clk);
    for (int t = 0; t < 5; t++)
      for (int r = 0; r < 32; r++) begin
        model[t][r] = (r == 0) ? 32'h0 : $urandom();
        if (usable(r)) begin
          we = 1; wtid = 3'(t); wa = 5'(r); wd = $urandom();
          if (r == 0) model[t][r] = 32'h0; else model[t][r] = wd;
          @(negedge clk);
        end
      end
    we = 0;
    for (int t = 0; t < 5; t++)
      for (int r = 0; r < 32; r++) begin
        if (!usable(r)) continue;
        rtid = 3'(t); ra1 = 5'(r); ra2 = 5'((r + 1) % 32);
        @(negedge clk);
        chk($sformatf("full t%0d r%0d p1", t, r), a1, model[t][r]);
        chk($sformatf("red  t%0d r%0d p1", t, r), b1, model[t][r]);
        if (usable((r + 1) % 32)) begin
          chk($sformatf("full t%0d r%0d p2", t, r), a2, model[t][(r + 1) % 32]);
          chk($sformatf("red  t%0d r%0d p2", t, r), b2, model[t][(r + 1) % 32]);
        end
      end
    // write-first: read and write thread 2 r7 on the same edge
    we = 1; wtid = 3'd2; wa = 5'd7; wd = 32'hCAFE_F00D;
    rtid = 3'd2; ra1 = 5'd7; ra2 = 5'd0;
    @(negedge clk);
    we = 0;
    chk("write-first full", a1, 32'hCAFE_F00D);
    chk("write-first reduced", b1, 32'hCAFE_F00D);
    chk("r0 zero", a2, 32'h0);
    // write to r0 ignored
    we = 1; wtid = 3'd1; wa = 5'd0; wd = 32'hFFFF_FFFF;
    @(negedge clk);
    we = 0; rtid = 3'd1; ra1 = 5'd0;
    @(negedge clk);
    chk("r0 stays zero", a1, 32'h0);
    chk("r0 stays zero reduced", b1, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
