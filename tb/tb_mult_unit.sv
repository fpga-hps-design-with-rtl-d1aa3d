// tb_mult_unit: self-checking test of the Lab 4 multiplier.
// Random and corner operands; checks the product, that done rises one
// clock after enable, that result holds while enable is low and that
// reset clears result and done.
module tb_mult_unit;
  logic clk = 0, reset = 1, enable = 0;
  logic [15:0] mult_a = 0, mult_b = 0;
  logic mult_done;
  logic [31:0] mult_result;
  int checks = 0, failures = 0;

  mult_unit dut (.*);
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

  task automatic mult(input logic [15:0] a, input logic [15:0] b);
    logic [31:0] expected;
    expected = {16'h0, a} * {16'h0, b};
    @(negedge clk) reset = 1;
    @(negedge clk) reset = 0;
    check(!mult_done && mult_result == 0, "reset clears done and result");
    mult_a = a; mult_b = b; enable = 1;
    @(negedge clk);
    check(mult_done, "done one clock after enable");
    check(mult_result == expected, $sformatf("%0d*%0d = %0d, expected %0d", a, b, mult_result, expected));
    enable = 0; mult_a = ~a; mult_b = 16'h1234;
    @(negedge clk);
    check(mult_done && mult_result == expected, "result and done hold while enable is low");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    mult(16'd27, 16'd28);
    mult(16'hffff, 16'hffff);
    mult(16'h0000, 16'hbeef);
    mult(16'h8000, 16'h0002);
    for (int i = 0; i < 40; i++) mult(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
