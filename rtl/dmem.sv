// dmem: the single physical data memory, split into one private range per
// thread.
//
// The memory holds WORDS 32-bit words. It is divided into 2^ceil(log2(THREADS))
// equal ranges of RANGE_WORDS words; a thread's address is taken modulo its
// range and the thread number forms the upper bits of the physical word
// address, so a thread can never touch another thread's data. The core port
// does byte, halfword and word loads and stores on byte addresses with byte
// enables; a load returns its word one cycle later, aligned and sign- or
// zero-extended. A second port, addressed by physical word, lets a host load
// data and read back results. Misaligned accesses are not detected: the low
// address bits select the byte lanes as if aligned.
module dmem
  import mt_pkg::*;
#(
  parameter int unsigned WORDS   = 16384,
  parameter int unsigned THREADS = 5,
  localparam int unsigned TW     = (THREADS <= 1) ? 1 : $clog2(THREADS),
  localparam int unsigned AW     = (WORDS <= 1) ? 1 : $clog2(WORDS),
  localparam int unsigned OW     = AW - TW   // word-offset bits inside a range
) (
  input  logic          clk,
  // core port
  input  logic          re,
  input  logic          we,
  input  logic [TW-1:0] tid,
  input  logic [31:0]   addr,        // byte address within the thread's range
  input  mem_size_e     size,
  input  logic          is_unsigned,
  input  logic [31:0]   wdata,       // store data, in the low bits
  output logic [31:0]   rdata,       // load result, the cycle after re
  // host port
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,   // physical word address
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata   // the cycle after host_addr
);
  logic [31:0] mem [WORDS];

  logic [AW-1:0] paddr;
  logic [3:0]    be;
  logic [31:0]   wlane;

  assign paddr = {tid, addr[OW+1:2]};

  always_comb begin
    unique case (size)
      MEM_B: begin be = 4'b0001 << addr[1:0]; wlane = {4{wdata[7:0]}};  end
      MEM_H: begin be = addr[1] ? 4'b1100 : 4'b0011; wlane = {2{wdata[15:0]}}; end
      default: begin be = 4'b1111; wlane = wdata; end
    endcase
  end

  logic [31:0]  rword;
  logic [1:0]   off_q;
  mem_size_e    size_q;
  logic         uns_q;

  always_ff @(posedge clk) begin
    if (we && 32'(paddr) < WORDS) begin
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[paddr][8*b +: 8] <= wlane[8*b +: 8];
    end
    if (re) begin
      rword  <= (32'(paddr) < WORDS) ? mem[paddr] : '0;
      off_q  <= addr[1:0];
      size_q <= size;
      uns_q  <= is_unsigned;
    end
    if (host_we && 32'(host_addr) < WORDS) mem[host_addr] <= host_wdata;
    host_rdata <= (32'(host_addr) < WORDS) ? mem[host_addr] : '0;
  end

  // Load alignment and extension
  logic [7:0]  byte_v;
  logic [15:0] half_v;
  always_comb begin
    byte_v = rword[8*off_q +: 8];
    half_v = off_q[1] ? rword[31:16] : rword[15:0];
    unique case (size_q)
      MEM_B:   rdata = uns_q ? {24'h0, byte_v} : {{24{byte_v[7]}}, byte_v};
      MEM_H:   rdata = uns_q ? {16'h0, half_v} : {{16{half_v[15]}}, half_v};
      default: rdata = rword;
    endcase
  end
endmodule
