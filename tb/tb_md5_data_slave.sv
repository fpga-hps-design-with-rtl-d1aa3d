// tb_md5_data_slave: self-checking test of the MD5 data slave (4 cores).
// Writes random words to random {core, word} addresses and checks the
// registered write strobe, index and data reach exactly that core one
// clock later; reads digest words 0..3 of each core and checks that
// words 4..15 read 0.
module tb_md5_data_slave;
  localparam int N = 4;
  logic clk = 0, reset = 1;
  logic [5:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [N-1:0] core_write;
  logic [3:0] core_writeaddr;
  logic [31:0] core_writedata;
  logic [N-1:0][127:0] core_digest;
  int checks = 0, failures = 0;

  md5_data_slave #(.N_CORES(N)) dut (.*);
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

  initial begin
    logic [1:0] c;
    logic [3:0] w;
    logic [31:0] d, e;
    for (int i = 0; i < N; i++) core_digest[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 200; i++) begin
      c = 2'($urandom); w = 4'($urandom); d = $urandom;
      @(negedge clk) avs_address = {c, w}; avs_write = 1; avs_writedata = d;
      @(negedge clk) avs_write = 0;
      check(core_write == (N'(1) << c), $sformatf("write strobe %b for core %0d", core_write, c));
      check(core_writeaddr == w && core_writedata == d, "write index and data");
      @(negedge clk);
      check(core_write == 0, "write strobe lasts one clock");
      c = 2'($urandom); w = 4'($urandom);
      @(negedge clk) avs_address = {c, w}; avs_read = 1;
      @(negedge clk) avs_read = 0;
      e = (w < 4) ? core_digest[c][127 - 32*w -: 32] : 32'h0;
      check(avs_readdata == e, $sformatf("read core %0d word %0d = %h expected %h", c, w, avs_readdata, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
