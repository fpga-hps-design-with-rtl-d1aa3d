// tb_avalon_pio: self-checking test of the write-only PIO register.
// pio_out must take writedata only at a clock edge where write is high
// and hold it otherwise; reset clears it.
module tb_avalon_pio;
  logic clk = 0, reset = 1, write = 0;
  logic [15:0] writedata = 0, pio_out, model;
  int checks = 0, failures = 0;

  avalon_pio dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (pio_out != 0) failures++;
    reset = 0;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      write = ($urandom % 3) == 0;
      writedata = 16'($urandom);
      if (write) model = writedata;
      @(negedge clk);
      write = 0;
      checks++;
      if (pio_out != model) begin
        failures++;
        $display("FAIL: pio_out %h expected %h", pio_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
