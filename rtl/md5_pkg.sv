// md5_pkg: constants and step functions of the MD5 compression function.
//
// MD5 hashes a message in 512-bit blocks of sixteen 32-bit little-endian
// words M[0..15]. Each block runs 64 steps over four 32-bit variables
// A, B, C, D. Step i uses a round function F (one of four, by i/16), a
// message word index g, an additive constant K[i] and a left-rotate
// amount s[i]; the block result is added into the chaining value
// (a0, b0, c0, d0), which starts at the MD5 initial value.
//
// K[i] = floor(|sin(i+1)| * 2^32), the standard MD5 table (64 words).
// The shift amounts repeat in groups of four within each 16-step round.
// All of this is the standard MD5 definition; the package only packs it
// into functions that the hardware step logic calls.
package md5_pkg;

  typedef logic [31:0] word_t;

  // Initial chaining value
  localparam word_t A0_INIT = 32'h67452301;
  localparam word_t B0_INIT = 32'hefcdab89;
  localparam word_t C0_INIT = 32'h98badcfe;
  localparam word_t D0_INIT = 32'h10325476;

  localparam int unsigned STEPS = 64;

  // Per-step additive constants, K[i] = floor(|sin(i+1)| * 2^32)
  localparam word_t K [STEPS] = '{
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee,
    32'hf57c0faf, 32'h4787c62a, 32'ha8304613, 32'hfd469501,
    32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be,
    32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821,
    32'hf61e2562, 32'hc040b340, 32'h265e5a51, 32'he9b6c7aa,
    32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed,
    32'ha9e3e905, 32'hfcefa3f8, 32'h676f02d9, 32'h8d2a4c8a,
    32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c,
    32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70,
    32'h289b7ec6, 32'heaa127fa, 32'hd4ef3085, 32'h04881d05,
    32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039,
    32'h655b59c3, 32'h8f0ccc92, 32'hffeff47d, 32'h85845dd1,
    32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1,
    32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391
  };

  // Left-rotate amount: four values per round (round = i/16), repeated
  // with j = i mod 4
  function automatic logic [4:0] md5_s(input logic [1:0] round, input logic [1:0] j);
    unique case ({round, j})
      4'b00_00: return 5'd7;   4'b00_01: return 5'd12;
      4'b00_10: return 5'd17;  4'b00_11: return 5'd22;
      4'b01_00: return 5'd5;   4'b01_01: return 5'd9;
      4'b01_10: return 5'd14;  4'b01_11: return 5'd20;
      4'b10_00: return 5'd4;   4'b10_01: return 5'd11;
      4'b10_10: return 5'd16;  4'b10_11: return 5'd23;
      4'b11_00: return 5'd6;   4'b11_01: return 5'd10;
      4'b11_10: return 5'd15;  default:  return 5'd21;
    endcase
  endfunction

  // Message word used by step i
  function automatic logic [3:0] md5_g(input logic [5:0] i);
    logic [7:0] ii;
    ii = {2'b00, i};
    unique case (i[5:4])
      2'd0:    return i[3:0];
      2'd1:    return 4'((8'd5 * ii) + 8'd1);
      2'd2:    return 4'((8'd3 * ii) + 8'd5);
      default: return 4'(8'd7 * ii);
    endcase
  endfunction

  // Round function of round i/16
  function automatic word_t md5_f(input logic [1:0] round, input word_t b,
                                  input word_t c, input word_t d);
    unique case (round)
      2'd0:    return (b & c) | (~b & d);
      2'd1:    return (d & b) | (~d & c);
      2'd2:    return b ^ c ^ d;
      default: return c ^ (b | ~d);
    endcase
  endfunction

  function automatic word_t rotl(input word_t x, input logic [4:0] n);
    return (x << n) | (x >> (6'd32 - {1'b0, n}));
  endfunction

endpackage
