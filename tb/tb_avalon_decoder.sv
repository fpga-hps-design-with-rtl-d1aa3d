// tb_avalon_decoder: self-checking test of the two-slave address decoder.
// Two small register-file slaves with read latency 1 sit behind it at
// the Lab 4 windows (0x00 and 0x40, 16 words each). Random writes and
// reads over both windows and outside them are checked against a model:
// each slave sees only its window, with the word address; reads return
// the right slave's data one clock later with readdatavalid; reads
// outside both windows return 0; writes there change nothing.
module tb_avalon_decoder;
  logic clk = 0, reset = 1;
  logic [20:0] m_address = 0;
  logic m_read = 0, m_write = 0, m_readdatavalid;
  logic [31:0] m_writedata = 0, m_readdata;
  logic [3:0] s0_address, s1_address;
  logic s0_read, s0_write, s1_read, s1_write;
  logic [31:0] s0_writedata, s1_writedata, s0_readdata, s1_readdata;
  logic [31:0] mem0 [16], mem1 [16], model [32];
  int checks = 0, failures = 0;

  avalon_decoder dut (.*);
  always #5 clk = ~clk;

  // slave models: register files with registered read data
  always_ff @(posedge clk) begin
    if (s0_write) mem0[s0_address] <= s0_writedata;
    if (s1_write) mem1[s1_address] <= s1_writedata;
    s0_readdata <= s0_read ? mem0[s0_address] : 32'hdead0000;
    s1_readdata <= s1_read ? mem1[s1_address] : 32'hdead0001;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [20:0] a;
    logic [31:0] d;
    int w;
    for (int i = 0; i < 16; i++) begin mem0[i] = 0; mem1[i] = 0; end
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 600; i++) begin
      // byte address: mostly inside the two windows, sometimes outside
      if ($urandom % 5 == 0) a = 21'h80 + 21'($urandom % 21'h1000) * 4;
      else a = 21'($urandom % 32) * 4;
      w = int'(a >> 2);
      @(negedge clk);
      m_address = a;
      if ($urandom % 2) begin
        m_write = 1; m_writedata = $urandom;
        if (a < 21'h80) model[w] = m_writedata;
        @(negedge clk) m_write = 0;
      end else begin
        m_read = 1;
        @(negedge clk) m_read = 0;
        check(m_readdatavalid, "readdatavalid one clock after read");
        d = (a < 21'h80) ? model[w] : 32'h0;
        check(m_readdata == d, $sformatf("read %h = %h, expected %h", a, m_readdata, d));
        @(negedge clk);
        check(!m_readdatavalid, "readdatavalid lasts one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
