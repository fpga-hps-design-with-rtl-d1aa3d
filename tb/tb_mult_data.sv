// tb_mult_data: self-checking test of the Lab 4 data slave.
// Writes operands (upper 16 bits must be dropped), reads them back at
// words 1 and 2, reads the multiplier result at word 0, checks the read
// latency of one clock and that unused words read 0 and ignore writes.
module tb_mult_data;
  logic clk = 0, reset = 1;
  logic [3:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [31:0] mult_in1, mult_in2, mult_result;
  int checks = 0, failures = 0;

  mult_data dut (.*);
  always #5 clk = ~clk;
  // stand-in for the multiplier: a known function of the operands
  assign mult_result = mult_in1 * mult_in2;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk) avs_address = a; avs_write = 1; avs_writedata = d;
    @(negedge clk) avs_write = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk) avs_address = a; avs_read = 1;
    @(negedge clk) avs_read = 0; d = avs_readdata;
  endtask

  initial begin
    logic [31:0] d, x, y;
    repeat (2) @(negedge clk);
    reset = 0;
    rd(4'd0, d); check(d == 0, "result 0 after reset");
    for (int i = 0; i < 30; i++) begin
      x = $urandom; y = $urandom;
      wr(4'd0, x);
      wr(4'd1, y);
      check(mult_in1 == {16'h0, x[15:0]}, "in1 keeps writedata[15:0]");
      check(mult_in2 == {16'h0, y[15:0]}, "in2 keeps writedata[15:0]");
      rd(4'd1, d); check(d == {16'h0, x[15:0]}, "read word 1 = in1");
      rd(4'd2, d); check(d == {16'h0, y[15:0]}, "read word 2 = in2");
      rd(4'd0, d); check(d == x[15:0] * y[15:0], "read word 0 = result");
    end
    wr(4'd5, 32'hffff);
    check(mult_in1 == {16'h0, x[15:0]} && mult_in2 == {16'h0, y[15:0]}, "write to word 5 ignored");
    rd(4'd7, d); check(d == 0, "unused word reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
