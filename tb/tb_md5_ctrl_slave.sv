// tb_md5_ctrl_slave: self-checking test of the MD5 control slave (8 cores).
// Checks the one-clock start pulse per written bit, the soft-reset
// register and its read-back, busy read-back at word 0, and the sticky
// done flags: set by a core's done pulse, cleared by start or reset.
module tb_md5_ctrl_slave;
  localparam int N = 8;
  logic clk = 0, reset = 1;
  logic [3:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [N-1:0] core_start, core_reset, core_done = 0, core_busy = 0;
  int checks = 0, failures = 0;

  md5_ctrl_slave #(.N_CORES(N)) dut (.*);
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
    logic [31:0] d;
    logic [N-1:0] s, dn, model_done;
    repeat (2) @(negedge clk);
    reset = 0;
    model_done = '0;
    for (int i = 0; i < 30; i++) begin
      // done pulses from some cores
      dn = N'($urandom);
      @(negedge clk) core_done = dn;
      @(negedge clk) core_done = '0;
      model_done |= dn;
      rd(4'd2, d); check(d == 32'(model_done), $sformatf("done flags %h expected %h", d, model_done));
      // start some cores: pulse lasts exactly one clock
      s = N'($urandom);
      @(negedge clk) avs_address = 0; avs_write = 1; avs_writedata = 32'(s);
      @(negedge clk) avs_write = 0;
      check(core_start == s, "start pulse after write");
      @(negedge clk);
      check(core_start == 0, "start pulse lasts one clock");
      model_done &= ~s;
      rd(4'd2, d); check(d == 32'(model_done), "start clears done flags");
      // busy read-back
      core_busy = N'($urandom);
      rd(4'd0, d); check(d == 32'(core_busy), "word 0 reads busy");
      // soft reset register
      s = N'($urandom);
      wr(4'd1, 32'(s));
      check(core_reset == s, "reset register output");
      rd(4'd1, d); check(d == 32'(s), "word 1 reads reset register");
      model_done &= ~s;
      wr(4'd1, 32'h0);
      check(core_reset == 0, "reset register cleared");
      rd(4'd2, d); check(d == 32'(model_done), "reset clears done flags");
      rd(4'd5, d); check(d == 0, "unused word reads 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
