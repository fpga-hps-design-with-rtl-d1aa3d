// tb_md5_core: self-checking test of md5_core.
//
// Hashes known strings (RFC 1321 test strings and others, one and two
// blocks, including the 55/56-byte padding boundary) and compares the
// digest with published MD5 values. The testbench pads each message
// itself, loads each block word by word, pulses start and checks that
// done arrives exactly 65 clocks later, lasts one cycle, and that busy is
// high in between. Also checks that reset aborts a running block.
module tb_md5_core;
  logic clk = 0, reset = 1;
  logic write = 0, start = 0;
  logic [3:0] writeaddr = '0;
  logic [31:0] writedata = '0;
  logic done, busy;
  logic [127:0] digest;
  int checks = 0, failures = 0;

  localparam int LATENCY = 65;

  md5_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Hex string digest (byte order as printed) -> {a0,b0,c0,d0}
  function automatic logic [127:0] to_words(input logic [127:0] hex);
    logic [127:0] r;
    for (int w = 0; w < 4; w++)
      for (int k = 0; k < 4; k++)
        r[127 - 32*w - 8*(3 - k) -: 8] = hex[127 - 8*(4*w + k) -: 8];
    return r;
  endfunction

  function automatic logic [7:0] padded_byte(input string s, input int idx, input int nbytes);
    longint unsigned bits;
    bits = 64'(s.len()) * 8;
    if (idx < s.len()) return s[idx];
    if (idx == s.len()) return 8'h80;
    if (idx >= nbytes - 8) return bits[8*(idx - (nbytes - 8)) +: 8];
    return 8'h00;
  endfunction

  task automatic hash(input string s, output logic [127:0] dig);
    int nblocks, nbytes, cyc;
    nblocks = (s.len() + 8) / 64 + 1;
    nbytes  = 64 * nblocks;
    @(negedge clk) reset = 1;
    @(negedge clk) reset = 0;
    for (int bk = 0; bk < nblocks; bk++) begin
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        write = 1;
        writeaddr = 4'(w);
        for (int k = 0; k < 4; k++)
          writedata[8*k +: 8] = padded_byte(s, 64*bk + 4*w + k, nbytes);
      end
      @(negedge clk) write = 0; start = 1;
      @(negedge clk) start = 0;
      cyc = 0;  // edges counted after the one that samples start
      check(busy, "busy after start");
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (cyc > 200) break;
      end
      check(cyc == LATENCY, $sformatf("latency %0d, expected %0d", cyc, LATENCY));
      @(negedge clk);
      check(!done && !busy, "done lasts one cycle and core idles");
    end
    dig = digest;
  endtask

  task automatic expect_md5(input string s, input logic [127:0] hex);
    logic [127:0] dig;
    hash(s, dig);
    check(dig == to_words(hex), $sformatf("md5(\"%s\") = %h, expected %h", s, dig, to_words(hex)));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    expect_md5("", 128'hd41d8cd98f00b204e9800998ecf8427e);
    expect_md5("abc", 128'h900150983cd24fb0d6963f7d28e17f72);
    expect_md5("The quick brown fox jumps over the lazy dog",
               128'h9e107d9d372bb6826bd81d3542a419d6);
    expect_md5({"1234567890123456789012345678901234567890",
                "1234567890123456789012345678901234567890"},
               128'h57edf4a22be3c955ac49da2e2107b67a);
    expect_md5({55{"a"}}, 128'hef1772b6dff9a122358552954ad0df65);
    expect_md5({56{"a"}}, 128'h3b0c8ac703f828b04c6c197006d17218);

    // Reset in the middle of a block aborts it and restores the IV
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (10) @(negedge clk);
    reset = 1;
    @(negedge clk) reset = 0;
    check(!busy && !done, "reset aborts a running block");
    check(digest == {32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476},
          "reset restores the initial chaining value");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
