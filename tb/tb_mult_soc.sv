// tb_mult_soc: end-to-end test of the Lab 4 multiplier system through its
// Avalon-MM master port, following the lab's software loop: for
// iteration i = 1..30, set and clear the reset register, write operands
// i and i+1, set start, poll done (control word 2, bit 0), read back
// product and both operands, clear start. Then random 16-bit operands
// and operands with upper bits set, which must be ignored. Counts the
// soft resets, done polls and completed products.
module tb_mult_soc;
  localparam logic [20:0] DATA = 21'h00, CTRL = 21'h40;
  logic clk = 0, reset = 1;
  logic [20:0] avm_address = 0;
  logic avm_read = 0, avm_write = 0, avm_readdatavalid;
  logic [31:0] avm_writedata = 0, avm_readdata;
  int checks = 0, failures = 0;
  int n_reset = 0, n_poll_wait = 0, n_products = 0;

  mult_soc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic av_write(input logic [20:0] a, input logic [31:0] d);
    @(negedge clk) avm_address = a; avm_write = 1; avm_writedata = d;
    @(negedge clk) avm_write = 0;
  endtask

  task automatic av_read(input logic [20:0] a, output logic [31:0] d);
    @(negedge clk) avm_address = a; avm_read = 1;
    @(negedge clk) avm_read = 0;
    if (!avm_readdatavalid) begin failures++; $display("FAIL: no readdatavalid"); end
    d = avm_readdata;
  endtask

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] d, word, op1, op2;
    int polls;
    av_write(CTRL + 21'd4, 32'd1);
    av_read(CTRL + 21'd8, d);
    check(d == 0, "done clear while reset is held");
    av_write(CTRL + 21'd4, 32'd0);
    n_reset++;
    av_write(DATA + 21'd0, x);
    av_write(DATA + 21'd4, y);
    av_write(CTRL + 21'd0, 32'd1);
    av_read(CTRL + 21'd0, d);
    check(d == 1, "start reads back");
    polls = 0;
    do begin
      av_read(CTRL + 21'd8, d);
      polls++;
    end while (!d[0] && polls < 100);
    if (polls >= 1) n_poll_wait++;
    check(d[0], "done set");
    av_read(DATA + 21'd0, word);
    av_read(DATA + 21'd4, op1);
    av_read(DATA + 21'd8, op2);
    check(op1 == {16'h0, x[15:0]} && op2 == {16'h0, y[15:0]}, "operands read back");
    check(word == op1 * op2, $sformatf("0x%08x * 0x%08x = 0x%08x", op1, op2, word));
    if (word == op1 * op2) n_products++;
    av_write(CTRL + 21'd0, 32'd0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 1; i <= 30; i++) run(i, i + 1);
    for (int i = 0; i < 20; i++) run($urandom, $urandom);
    check(n_reset > 0 && n_poll_wait > 0 && n_products == 50,
          $sformatf("mechanisms: resets=%0d polls=%0d products=%0d", n_reset, n_poll_wait, n_products));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
