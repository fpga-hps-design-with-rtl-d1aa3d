// md5_ref.svh: behavioural MD5 reference for testbenches.
//
// Byte-oriented MD5 of a string, written independently of the RTL: the
// step constants are computed at run time as floor(|sin(i+1)| * 2^32),
// and the message is padded here. The result is returned as the four
// chaining words {a0, b0, c0, d0}, the same layout as the RTL digest.
// Also: md5_block_word() gives word w of block b of the padded message,
// and md5_nblocks() the number of 64-byte blocks.

function automatic int md5_nblocks(input string s);
  return (s.len() + 8) / 64 + 1;
endfunction

function automatic logic [7:0] md5_pad_byte(input string s, input int idx);
  int nbytes;
  logic [63:0] bits;
  nbytes = 64 * md5_nblocks(s);
  bits = 64'(s.len()) * 64'd8;
  if (idx < s.len()) return s[idx];
  if (idx == s.len()) return 8'h80;
  if (idx >= nbytes - 8) return bits[8*(idx - (nbytes - 8)) +: 8];
  return 8'h00;
endfunction

function automatic logic [31:0] md5_block_word(input string s, input int b, input int w);
  logic [31:0] r;
  for (int k = 0; k < 4; k++) r[8*k +: 8] = md5_pad_byte(s, 64*b + 4*w + k);
  return r;
endfunction

function automatic logic [127:0] md5_ref(input string s);
  int sh [4][4] = '{'{7, 12, 17, 22}, '{5, 9, 14, 20}, '{4, 11, 16, 23}, '{6, 10, 15, 21}};
  logic [31:0] h [4];
  logic [31:0] m [16];
  logic [31:0] a, b, c, d, f, t, k;
  int g, r;
  real x;
  h[0] = 32'h67452301; h[1] = 32'hefcdab89; h[2] = 32'h98badcfe; h[3] = 32'h10325476;
  for (int blk = 0; blk < md5_nblocks(s); blk++) begin
    for (int w = 0; w < 16; w++) m[w] = md5_block_word(s, blk, w);
    a = h[0]; b = h[1]; c = h[2]; d = h[3];
    for (int i = 0; i < 64; i++) begin
      r = i / 16;
      case (r)
        0: begin f = (b & c) | (~b & d); g = i; end
        1: begin f = (d & b) | (~d & c); g = (5*i + 1) % 16; end
        2: begin f = b ^ c ^ d;          g = (3*i + 5) % 16; end
        default: begin f = c ^ (b | ~d); g = (7*i) % 16; end
      endcase
      x = $sin(real'(i + 1));
      if (x < 0.0) x = -x;
      k = 32'(longint'($floor(x * 4294967296.0)));
      t = a + f + k + m[g];
      t = (t << sh[r][i % 4]) | (t >> (32 - sh[r][i % 4]));
      a = d; d = c; c = b; b = b + t;
    end
    h[0] += a; h[1] += b; h[2] += c; h[3] += d;
  end
  return {h[0], h[1], h[2], h[3]};
endfunction
