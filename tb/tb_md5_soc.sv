// tb_md5_soc: end-to-end test of the MD5 system (32 cores) through its
// Avalon-MM master port, the way the processor software drives it.
//
//  - parallel: 32 different messages loaded into the 32 cores, all
//    started by one write; busy is polled (more than one core must be
//    seen busy at once) and done is polled until all 32 flags are set,
//    which must happen within a few clocks of one core's latency
//  - sequential: messages hashed one after another on core 0, each after
//    a soft reset of the core
//  - chaining: a two-block message hashed by core 5 without a reset
//    between the blocks
//  - sticky done and its clearing by soft reset
// Every digest is compared with a behavioural MD5 model and, for one
// message, with its published digest.
module tb_md5_soc;
  localparam int N = 32;
  localparam logic [20:0] DATA = 21'h000, CTRL = 21'h800;
  logic clk = 0, reset = 1;
  logic [20:0] avm_address = 0;
  logic avm_read = 0, avm_write = 0, avm_readdatavalid;
  logic [31:0] avm_writedata = 0, avm_readdata;
  int checks = 0, failures = 0;
  int n_parallel = 0, n_sequential = 0, n_chain = 0, n_soft_reset = 0, n_sticky = 0;

  `include "md5_ref.svh"

  md5_soc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  function automatic logic [20:0] data_addr(input int core, input int word);
    return DATA + 21'((core * 16 + word) * 4);
  endfunction

  task automatic load_block(input int core, input string s, input int blk);
    for (int w = 0; w < 16; w++) av_write(data_addr(core, w), md5_block_word(s, blk, w));
  endtask

  task automatic read_digest(input int core, output logic [127:0] dig);
    logic [31:0] d;
    for (int w = 0; w < 4; w++) begin
      av_read(data_addr(core, w), d);
      dig[127 - 32*w -: 32] = d;
    end
  endtask

  task automatic soft_reset(input logic [31:0] mask);
    av_write(CTRL + 21'd4, mask);
    av_write(CTRL + 21'd4, 32'h0);
    n_soft_reset++;
  endtask

  task automatic wait_done(input logic [31:0] mask, output int clocks);
    logic [31:0] d;
    clocks = 0;
    do begin
      av_read(CTRL + 21'd8, d);
      clocks += 2;
    end while ((d & mask) != mask && clocks < 2000);
  endtask

  // hash a whole message on one core, block by block
  task automatic hash_on(input int core, input string s, output logic [127:0] dig);
    int clocks;
    soft_reset(32'(1) << core);
    for (int b = 0; b < md5_nblocks(s); b++) begin
      load_block(core, s, b);
      av_write(CTRL, 32'(1) << core);
      wait_done(32'(1) << core, clocks);
      if (b > 0) n_chain++;
    end
    read_digest(core, dig);
  endtask

  string msgs [N];

  initial begin
    logic [127:0] dig;
    logic [31:0] d;
    int clocks, busy_max;
    repeat (3) @(negedge clk);
    reset = 0;

    // the behavioural model itself against a published digest
    check(md5_ref("abc") == {32'h98500190, 32'hb04fd23c, 32'h7d3f96d6, 32'h727fe128},
          "reference model md5(\"abc\")");

    // parallel: one message per core, one start for all
    soft_reset('1);
    for (int c = 0; c < N; c++) begin
      msgs[c] = $sformatf("password%0d", c * 37 + 11);
      load_block(c, msgs[c], 0);
    end
    av_write(CTRL, '1);
    busy_max = 0;
    av_read(CTRL, d);
    busy_max = $countones(d);
    wait_done('1, clocks);
    check(busy_max > 1, $sformatf("cores ran in parallel (%0d busy)", busy_max));
    if (busy_max > 1) n_parallel++;
    check(clocks <= 76, $sformatf("32 hashes done %0d clocks after start", clocks));
    for (int c = 0; c < N; c++) begin
      read_digest(c, dig);
      check(dig == md5_ref(msgs[c]), $sformatf("core %0d md5(\"%s\")", c, msgs[c]));
    end
    // done flags stay set until cleared
    repeat (20) @(negedge clk);
    av_read(CTRL + 21'd8, d);
    check(d == '1, "done flags are sticky");
    if (d == '1) n_sticky++;
    soft_reset(32'h0000_ffff);
    av_read(CTRL + 21'd8, d);
    check(d == 32'hffff_0000, "soft reset clears done flags of the reset cores");

    // sequential on one core
    for (int i = 0; i < 4; i++) begin
      string s;
      s = $sformatf("seq-%0d-%0d", i, i * i);
      hash_on(0, s, dig);
      check(dig == md5_ref(s), $sformatf("sequential md5(\"%s\")", s));
      n_sequential++;
    end

    // chaining: a two-block message
    begin
      string s;
      s = {"1234567890123456789012345678901234567890",
           "1234567890123456789012345678901234567890"};
      hash_on(5, s, dig);
      check(dig == {32'ha2f4ed57, 32'h55c9e32b, 32'h2eda49ac, 32'h7ab60721},
            "two-block message against its published digest");
    end

    check(n_parallel > 0, "parallel hashing happened");
    check(n_sequential > 0, "sequential hashing happened");
    check(n_chain > 0, "multi-block chaining happened");
    check(n_soft_reset > 0, "soft reset happened");
    check(n_sticky > 0, "sticky done observed");
    $display("mechanisms: parallel=%0d sequential=%0d chain=%0d soft_reset=%0d sticky=%0d",
             n_parallel, n_sequential, n_chain, n_soft_reset, n_sticky);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
