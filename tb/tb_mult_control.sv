// tb_mult_control: self-checking test of the Lab 4 control slave.
// Writes start and reset registers, checks the outputs and read-back at
// words 0 and 1, reads the done input at word 2 and checks that unused
// words read 0 and ignore writes.
module tb_mult_control;
  logic clk = 0, reset = 1;
  logic [3:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [31:0] mult_start, mult_reset, mult_done = 0;
  int checks = 0, failures = 0;

  mult_control dut (.*);
  always #5 clk = ~clk;

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
    logic [31:0] d, s, r;
    repeat (2) @(negedge clk);
    reset = 0;
    check(mult_start == 0 && mult_reset == 0, "registers clear on reset");
    for (int i = 0; i < 20; i++) begin
      s = $urandom; r = $urandom;
      wr(4'd0, s);
      check(mult_start == s, "start register output");
      wr(4'd1, r);
      check(mult_reset == r && mult_start == s, "reset register output");
      rd(4'd0, d); check(d == s, "read word 0 = start");
      rd(4'd1, d); check(d == r, "read word 1 = reset");
      mult_done = $urandom;
      rd(4'd2, d); check(d == mult_done, "read word 2 = done");
      wr(4'd2, 32'h0); wr(4'd9, 32'h0);
      check(mult_start == s && mult_reset == r, "writes to words 2 and 9 ignored");
      rd(4'd3, d); check(d == 0, "unused word reads 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
