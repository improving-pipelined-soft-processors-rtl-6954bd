// thread_pcs: the replicated program counters of the threads and the
// round-robin thread selector.
//
// One PC register per thread. Each cycle in which fetch is asserted, the
// selected thread's PC is sent to the instruction memory, that PC advances by
// 4 and the selector moves to the next thread in round-robin order
// (0, 1, ..., THREADS-1, 0, ...). When fetch is low (the 3-stage pipeline
// stalls) nothing changes. A taken branch or jump, resolved later in the
// pipeline, overwrites the PC of the thread that executed it through the
// redirect port. If the redirected thread is the one being selected in the
// same cycle, the target is forwarded straight to the fetch address; this
// path is needed only when there are fewer threads than the pipeline needs
// to hide branch resolution (a short pipeline with one thread fewer than its
// stages). Reset loads each thread's start address from reset_pc.
module thread_pcs #(
  parameter int unsigned THREADS = 5,
  localparam int unsigned TW     = (THREADS <= 1) ? 1 : $clog2(THREADS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   reset_pc [THREADS],
  input  logic          fetch,          // advance: fetch the selected thread
  output logic [TW-1:0] sel_tid,        // thread to be fetched
  output logic [31:0]   sel_pc,         // its fetch address
  input  logic          redirect,
  input  logic [TW-1:0] redirect_tid,
  input  logic [31:0]   redirect_pc
);
  logic [31:0] pc [THREADS];
  logic        bypass;

  assign bypass = redirect && (redirect_tid == sel_tid);
  assign sel_pc = bypass ? redirect_pc : pc[sel_tid];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_tid <= '0;
      for (int t = 0; t < THREADS; t++) pc[t] <= reset_pc[t];
    end else begin
      if (redirect) pc[redirect_tid] <= redirect_pc;
      if (fetch) begin
        pc[sel_tid] <= sel_pc + 32'd4;
        sel_tid     <= (32'(sel_tid) == THREADS - 1) ? '0 : sel_tid + 1'b1;
      end
    end
  end
endmodule
