// mt_regfile: one physical register file shared by all threads.
//
// Each thread owns a contiguous range of the physical file. With the full 32
// registers per thread the physical index is {thread, register}, i.e. the
// register number shifted by the thread number. With fewer registers per
// thread (NUM_REGS = 25: the compiler leaves s0-s6, r16-r22, unused) the
// index is thread*NUM_REGS plus the compacted register number, an offset
// addition rather than a shift. The file is stored twice, one copy per read
// port, and every write goes to both copies, so two operands are read per
// cycle from memories that each have a single read port.
//
// Timing: read addresses (and the thread) are registered on the clock edge;
// rd1/rd2 are valid in the following cycle. A write presented in a cycle is
// stored at the end of that cycle, and a read registered on that same edge
// already returns the new value (write-first block memory mode). Register 0 reads as zero and ignores
// writes. Accesses to removed registers are not allowed (checked by an
// assertion); their writes are dropped.
module mt_regfile #(
  parameter int unsigned THREADS  = 5,
  parameter int unsigned NUM_REGS = 32,
  localparam int unsigned TW      = (THREADS <= 1) ? 1 : $clog2(THREADS)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [TW-1:0] rtid,
  input  logic [4:0]    ra1,
  input  logic [4:0]    ra2,
  output logic [31:0]   rd1,
  output logic [31:0]   rd2,
  input  logic          we,
  input  logic [TW-1:0] wtid,
  input  logic [4:0]    wa,
  input  logic [31:0]   wd
);
  localparam int unsigned DEPTH   = THREADS * NUM_REGS;
  localparam int unsigned AW      = (DEPTH <= 1) ? 1 : $clog2(DEPTH);
  localparam int unsigned REMOVED = 32 - NUM_REGS;

  initial begin
    assert (NUM_REGS >= 16 && NUM_REGS <= 32)
      else $fatal(1, "mt_regfile: NUM_REGS must be 16..32");
  end

  function automatic logic [4:0] compact(logic [4:0] r);
    if (NUM_REGS == 32 || r < 5'd16) return r;
    return r - 5'(REMOVED);
  endfunction

  function automatic logic present(logic [4:0] r);
    return (r < 5'd16) || (r >= 5'(16 + REMOVED));
  endfunction

  function automatic logic [AW-1:0] phys(logic [TW-1:0] t, logic [4:0] r);
    if (NUM_REGS == 32) return AW'({t, r});
    return AW'(32'(t) * NUM_REGS + 32'(compact(r)));
  endfunction

  logic [31:0] q1, q2;
  logic        z1, z2;
  logic        wr_en;

  assign wr_en = we && (wa != 5'd0) && present(wa);

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(32), .WRITE_FIRST(1'b1)) u_copy1 (
    .clk, .we(wr_en), .waddr(phys(wtid, wa)), .wdata(wd),
    .re, .raddr(phys(rtid, ra1)), .rdata(q1));

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(32), .WRITE_FIRST(1'b1)) u_copy2 (
    .clk, .we(wr_en), .waddr(phys(wtid, wa)), .wdata(wd),
    .re, .raddr(phys(rtid, ra2)), .rdata(q2));

  always_ff @(posedge clk) begin
    if (re) begin
      z1 <= (ra1 == 5'd0);
      z2 <= (ra2 == 5'd0);
    end
  end

  assign rd1 = z1 ? '0 : q1;
  assign rd2 = z2 ? '0 : q2;

  // A program built for the reduced file never names a removed register.
  always_ff @(posedge clk) begin
    if (we && wa != 5'd0)
      assert (present(wa)) else $error("mt_regfile: write to removed register r%0d", wa);
  end
endmodule
