// tb_md5_throughput: sequential (1 core) against parallel (32 cores).
//
// The same 32 single-block messages are hashed by an MD5 system with one
// core, one message after another, and by the default system with 32
// cores, all loaded first and started together. Both are driven through
// their Avalon-MM ports with one transfer per two clocks, as a simple
// bus master would. The testbench checks every digest against a
// behavioural MD5 model, reports clocks per hash for both, and checks
// that the 32-core system finishes the batch at least twice as fast.
// Loading 16 message words per hash over the bus bounds the speed-up,
// not the cores: the compute part of the parallel batch is one core
// latency for all 32 messages.
module tb_md5_throughput;
  localparam int MSGS = 32;
  localparam logic [20:0] CTRL = 21'h800;
  logic clk = 0, reset = 1;
  // one-core system
  logic [20:0] a1 = 0;
  logic r1 = 0, w1 = 0, v1;
  logic [31:0] wd1 = 0, rd1;
  // 32-core system
  logic [20:0] a32 = 0;
  logic r32 = 0, w32 = 0, v32;
  logic [31:0] wd32 = 0, rd32;
  int checks = 0, failures = 0;

  `include "md5_ref.svh"

  md5_soc #(.N_CORES(1)) u_seq (
    .clk, .reset, .avm_address(a1), .avm_read(r1), .avm_write(w1),
    .avm_writedata(wd1), .avm_readdata(rd1), .avm_readdatavalid(v1));
  md5_soc u_par (
    .clk, .reset, .avm_address(a32), .avm_read(r32), .avm_write(w32),
    .avm_writedata(wd32), .avm_readdata(rd32), .avm_readdatavalid(v32));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus access to either system (sys 0: one core, sys 1: 32 cores)
  task automatic wr(input int sys, input logic [20:0] a, input logic [31:0] d);
    @(negedge clk);
    if (sys == 0) begin a1 = a; w1 = 1; wd1 = d; end
    else          begin a32 = a; w32 = 1; wd32 = d; end
    @(negedge clk) w1 = 0; w32 = 0;
  endtask

  task automatic rd(input int sys, input logic [20:0] a, output logic [31:0] d);
    @(negedge clk);
    if (sys == 0) begin a1 = a; r1 = 1; end
    else          begin a32 = a; r32 = 1; end
    @(negedge clk) r1 = 0; r32 = 0;
    d = (sys == 0) ? rd1 : rd32;
  endtask

  task automatic wait_done(input int sys, input logic [31:0] mask);
    logic [31:0] d;
    int n;
    n = 0;
    do begin rd(sys, CTRL + 21'd8, d); n++; end while ((d & mask) != mask && n < 1000);
  endtask

  task automatic get_digest(input int sys, input int core, output logic [127:0] dig);
    logic [31:0] d;
    for (int w = 0; w < 4; w++) begin
      rd(sys, 21'((core * 16 + w) * 4), d);
      dig[127 - 32*w -: 32] = d;
    end
  endtask

  string msgs [MSGS];

  initial begin
    logic [127:0] dig;
    longint t0, t_seq, t_par;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 0; i < MSGS; i++) msgs[i] = $sformatf("candidate-%04d", 7 * i + 3);

    // sequential: one core, one message at a time
    t0 = $time;
    for (int i = 0; i < MSGS; i++) begin
      wr(0, CTRL + 21'd4, 32'd1);
      wr(0, CTRL + 21'd4, 32'd0);
      for (int w = 0; w < 16; w++) wr(0, 21'(w * 4), md5_block_word(msgs[i], 0, w));
      wr(0, CTRL, 32'd1);
      wait_done(0, 32'd1);
      get_digest(0, 0, dig);
      check(dig == md5_ref(msgs[i]), $sformatf("1 core: md5(\"%s\")", msgs[i]));
    end
    t_seq = ($time - t0) / 10;

    // parallel: 32 cores, one start
    t0 = $time;
    wr(1, CTRL + 21'd4, '1);
    wr(1, CTRL + 21'd4, '0);
    for (int i = 0; i < MSGS; i++)
      for (int w = 0; w < 16; w++) wr(1, 21'((i * 16 + w) * 4), md5_block_word(msgs[i], 0, w));
    wr(1, CTRL, '1);
    wait_done(1, '1);
    for (int i = 0; i < MSGS; i++) begin
      get_digest(1, i, dig);
      check(dig == md5_ref(msgs[i]), $sformatf("32 cores: md5(\"%s\")", msgs[i]));
    end
    t_par = ($time - t0) / 10;

    $display("1 core:   %0d hashes in %0d clocks (%0d clocks per hash)", MSGS, t_seq, t_seq / MSGS);
    $display("32 cores: %0d hashes in %0d clocks (%0d clocks per hash)", MSGS, t_par, t_par / MSGS);
    check(2 * t_par < t_seq, "32 cores at least twice as fast as 1 core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
