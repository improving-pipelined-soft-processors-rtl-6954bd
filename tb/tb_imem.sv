// tb_imem: loads random words through the load port and fetches them back
// by byte address, checking the one-cycle fetch latency and that the output
// holds while fetch is disabled.
module tb_imem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        fetch_en = 0, load_we = 0;
  logic [31:0] fetch_addr = 0, fetch_data, load_data = 0;
  logic [9:0]  load_addr = 0;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  imem #(.WORDS(1024)) dut (.clk, .fetch_en, .fetch_addr, .fetch_data,
                            .load_we, .load_addr, .load_data);

  initial begin
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      model[i] = $urandom();
      load_we = 1; load_addr = 10'(i); load_data = model[i];
      @(negedge clk);
    end
    load_we = 0;
    for (int k = 0; k < 300; k++) begin
      int i = $urandom_range(0, 1023);
      fetch_en = 1; fetch_addr = 32'(i * 4);
      @(negedge clk);
      fetch_en = 0; fetch_addr = 32'h0;
      checks++;
      if (fetch_data !== model[i]) begin
        failures++; $display("FAIL word %0d: %h expected %h", i, fetch_data, model[i]);
      end
      @(negedge clk);
      checks++;
      if (fetch_data !== model[i]) begin
        failures++; $display("FAIL hold word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
