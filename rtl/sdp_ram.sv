// sdp_ram: simple dual-port synchronous RAM, one write port and one read
// port, as an FPGA block memory provides them. The read address is registered
// on the clock edge and the data appears after it; a read and a write of the
// same word on the same edge return the old word (read-before-write) or, with
// WRITE_FIRST = 1, the word being written (the mixed-port "new data" mode of
// a block memory). The contents are not reset.
module sdp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 32,
  parameter bit          WRITE_FIRST = 1'b0,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    if (re) begin
      if (WRITE_FIRST && we && waddr == raddr) rdata <= wdata;
      else rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
    end
  end
endmodule
