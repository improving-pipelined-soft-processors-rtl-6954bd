// tb_dmem: random byte, halfword and word stores and loads from five
// threads against a byte-array model, checking lane selection, sign and
// zero extension, the one-cycle load latency, that each thread sees only
// its own range (the same thread address in two threads holds different
// data) and host-port reads of the physical layout.
module tb_dmem;
  import mt_pkg::*;
  localparam int WORDS = 1024, T = 5, RANGE = WORDS / 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        re = 0, we = 0, is_unsigned = 0, host_we = 0;
  logic [2:0]  tid = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, host_wdata = 0, host_rdata;
  logic [9:0]  host_addr = 0;
  mem_size_e   size = MEM_W;
  logic [7:0]  model [WORDS * 4];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS), .THREADS(T)) dut (.clk, .re, .we, .tid, .addr, .size,
    .is_unsigned, .wdata, .rdata, .host_we, .host_addr, .host_wdata, .host_rdata);

  function automatic int phys_byte(int t, int a);
    return t * RANGE * 4 + (a % (RANGE * 4));
  endfunction

  function automatic logic [31:0] load_model(int t, int a, mem_size_e s, logic u);
    int p;
    logic [31:0] v;
    p = phys_byte(t, a);
    case (s)
      MEM_B: v = u ? {24'h0, model[p]} : {{24{model[p][7]}}, model[p]};
      MEM_H: v = u ? {16'h0, model[p+1], model[p]} : {{16{model[p+1][7]}}, model[p+1], model[p]};
      default: v = {model[p+3], model[p+2], model[p+1], model[p]};
    endcase
    return v;
  endfunction

  initial begin
    @(negedge clk);
    // clear through the host port
    for (int i = 0; i < WORDS; i++) begin
      host_we = 1; host_addr = 10'(i); host_wdata = 32'h0;
      @(negedge clk);
    end
    host_we = 0;
    foreach (model[i]) model[i] = 8'h0;
    for (int k = 0; k < 600; k++) begin
      int t, a, s, p;
      t = $urandom_range(0, T - 1);
      s = $urandom_range(0, 2);
      a = $urandom_range(0, 63) * 4 + ((s == 0) ? $urandom_range(0, 3) : (s == 1) ? 2 * $urandom_range(0, 1) : 0);
      tid = 3'(t); addr = 32'(a); size = mem_size_e'(s); is_unsigned = 1'($urandom_range(0, 1));
      if (k % 2 == 0) begin
        we = 1; re = 0; wdata = $urandom();
        p = phys_byte(t, a);
        model[p] = wdata[7:0];
        if (s >= 1) model[p+1] = wdata[15:8];
        if (s == 2) begin model[p+2] = wdata[23:16]; model[p+3] = wdata[31:24]; end
        @(negedge clk);
        we = 0;
      end else begin
        logic [31:0] e;
        we = 0; re = 1;
        e = load_model(t, a, size, is_unsigned);
        @(negedge clk);
        re = 0;
        checks++;
        if (rdata !== e) begin
          failures++;
          $display("FAIL load t%0d a%0d s%0d u%0d: %h expected %h", t, a, s, is_unsigned, rdata, e);
        end
      end
    end
    // host view of the physical layout
    for (int i = 0; i < T * RANGE; i += 7) begin
      host_addr = 10'(i);
      @(negedge clk);
      checks++;
      if (host_rdata !== {model[4*i+3], model[4*i+2], model[4*i+1], model[4*i]}) begin
        failures++; $display("FAIL host word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
