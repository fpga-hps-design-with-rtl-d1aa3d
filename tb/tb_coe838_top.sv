// tb_coe838_top: end-to-end test of the whole top level at its default
// parameters (32 MD5 cores), driving the three systems through their own
// ports at the same time:
//  - MD5: 32 messages hashed in parallel with one start, a two-block
//    message chained on one core, soft reset before each new message,
//    done polled; digests checked against a behavioural MD5 model
//  - multiplier: the lab's 30-iteration loop (operands i and i+1),
//    reset, start, done poll, product read back
//  - PIO: random writes, output checked after each
// Counts each mechanism and fails if one never happened.
module tb_coe838_top;
  localparam int N = 32;
  localparam logic [20:0] MD5_CTRL = 21'h800, MULT_CTRL = 21'h40;
  logic clk = 0, reset = 1;
  logic [20:0] md5_address = 0, mult_address = 0;
  logic md5_read = 0, md5_write = 0, md5_readdatavalid;
  logic mult_read = 0, mult_write = 0, mult_readdatavalid;
  logic [31:0] md5_writedata = 0, md5_readdata, mult_writedata = 0, mult_readdata;
  logic pio_write = 0;
  logic [15:0] pio_writedata = 0, pio_out;
  int checks = 0, failures = 0;
  int n_parallel = 0, n_chain = 0, n_md5_reset = 0, n_mult = 0, n_mult_reset = 0, n_pio = 0;

  `include "md5_ref.svh"

  coe838_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- MD5 port ----------------
  task automatic md5_wr(input logic [20:0] a, input logic [31:0] d);
    @(negedge clk) md5_address = a; md5_write = 1; md5_writedata = d;
    @(negedge clk) md5_write = 0;
  endtask

  task automatic md5_rd(input logic [20:0] a, output logic [31:0] d);
    @(negedge clk) md5_address = a; md5_read = 1;
    @(negedge clk) md5_read = 0;
    if (!md5_readdatavalid) begin failures++; $display("FAIL: md5 readdatavalid"); end
    d = md5_readdata;
  endtask

  task automatic md5_soft_reset(input logic [31:0] mask);
    md5_wr(MD5_CTRL + 21'd4, mask);
    md5_wr(MD5_CTRL + 21'd4, 32'h0);
    n_md5_reset++;
  endtask

  task automatic md5_load(input int core, input string s, input int blk);
    for (int w = 0; w < 16; w++) md5_wr(21'((core * 16 + w) * 4), md5_block_word(s, blk, w));
  endtask

  task automatic md5_wait(input logic [31:0] mask);
    logic [31:0] d;
    int n;
    n = 0;
    do begin md5_rd(MD5_CTRL + 21'd8, d); n++; end while ((d & mask) != mask && n < 1000);
    check((d & mask) == mask, "md5 done flags");
  endtask

  task automatic md5_digest(input int core, output logic [127:0] dig);
    logic [31:0] d;
    for (int w = 0; w < 4; w++) begin
      md5_rd(21'((core * 16 + w) * 4), d);
      dig[127 - 32*w -: 32] = d;
    end
  endtask

  task automatic md5_test();
    string msgs [N];
    string long_msg;
    logic [127:0] dig;
    logic [31:0] d;
    md5_soft_reset('1);
    for (int c = 0; c < N; c++) begin
      msgs[c] = $sformatf("key%0d", 1000 + c);
      md5_load(c, msgs[c], 0);
    end
    md5_wr(MD5_CTRL, '1);
    md5_rd(MD5_CTRL, d);
    if ($countones(d) > 1) n_parallel++;
    md5_wait('1);
    for (int c = 0; c < N; c++) begin
      md5_digest(c, dig);
      check(dig == md5_ref(msgs[c]), $sformatf("md5 core %0d", c));
    end
    long_msg = {"The quick brown fox jumps over the lazy dog, ",
                "and the lazy dog does not mind at all."};
    md5_soft_reset(32'h8000_0000);
    for (int b = 0; b < md5_nblocks(long_msg); b++) begin
      md5_load(31, long_msg, b);
      md5_wr(MD5_CTRL, 32'h8000_0000);
      md5_wait(32'h8000_0000);
      if (b > 0) n_chain++;
    end
    md5_digest(31, dig);
    check(dig == md5_ref(long_msg), "two-block message");
  endtask

  // ---------------- multiplier port ----------------
  task automatic mult_wr(input logic [20:0] a, input logic [31:0] d);
    @(negedge clk) mult_address = a; mult_write = 1; mult_writedata = d;
    @(negedge clk) mult_write = 0;
  endtask

  task automatic mult_rd(input logic [20:0] a, output logic [31:0] d);
    @(negedge clk) mult_address = a; mult_read = 1;
    @(negedge clk) mult_read = 0;
    if (!mult_readdatavalid) begin failures++; $display("FAIL: mult readdatavalid"); end
    d = mult_readdata;
  endtask

  task automatic mult_test();
    logic [31:0] d, word, op1, op2;
    int n;
    for (int i = 1; i <= 30; i++) begin
      mult_wr(MULT_CTRL + 21'd4, 32'd1);
      mult_wr(MULT_CTRL + 21'd4, 32'd0);
      n_mult_reset++;
      mult_wr(21'h0, i);
      mult_wr(21'h4, i + 1);
      mult_wr(MULT_CTRL, 32'd1);
      n = 0;
      do begin mult_rd(MULT_CTRL + 21'd8, d); n++; end while (!d[0] && n < 100);
      mult_rd(21'h0, word);
      mult_rd(21'h4, op1);
      mult_rd(21'h8, op2);
      check(word == 32'(i * (i + 1)) && op1 == i && op2 == i + 1,
            $sformatf("0x%08x * 0x%08x = 0x%08x", op1, op2, word));
      if (word == op1 * op2) n_mult++;
      mult_wr(MULT_CTRL, 32'd0);
    end
  endtask

  // ---------------- PIO port ----------------
  task automatic pio_test();
    for (int i = 0; i < 50; i++) begin
      logic [15:0] v;
      v = 16'($urandom);
      @(negedge clk) pio_write = 1; pio_writedata = v;
      @(negedge clk) pio_write = 0; pio_writedata = ~v;
      @(negedge clk);
      check(pio_out == v, "pio_out holds the written value");
      if (pio_out == v) n_pio++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    fork
      md5_test();
      mult_test();
      pio_test();
    join
    check(n_parallel > 0, "md5 parallel cores happened");
    check(n_chain > 0, "md5 block chaining happened");
    check(n_md5_reset > 0, "md5 soft reset happened");
    check(n_mult == 30, "30 lab multiplier iterations passed");
    check(n_mult_reset > 0, "multiplier reset happened");
    check(n_pio > 0, "pio writes happened");
    $display("mechanisms: md5_parallel=%0d md5_chain=%0d md5_reset=%0d mult=%0d mult_reset=%0d pio=%0d",
             n_parallel, n_chain, n_md5_reset, n_mult, n_mult_reset, n_pio);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
