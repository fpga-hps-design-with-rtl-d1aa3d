// md5_core: iterative MD5 compression unit, one MD5 step per clock.
//
// The core holds one 512-bit message block as sixteen 32-bit words,
// loaded one word per clock through write/writeaddr/writedata (word
// writeaddr = M[writeaddr], little-endian as MD5 defines it). A start
// pulse copies the chaining value (a0,b0,c0,d0) into A..D and runs the
// 64 MD5 steps, one per clock; one more clock adds A..D into the chaining
// value, updates digest and pulses done for one cycle. Because the
// chaining value is kept between blocks, a message of several blocks is
// hashed by loading and starting each block in turn; reset returns the
// chaining value to the MD5 initial value and clears the message words.
//
// Interface (after the MD5 timing diagram): clk, reset (synchronous,
// active high), write/writeaddr/writedata, start, done, digest. busy is
// this design's addition so a controller can tell a running core.
// digest = {a0, b0, c0, d0}: a0 in bits 127:96. The byte-oriented MD5
// hex string is each of these words in little-endian byte order.
//
// Timing: start sampled on edge 0; steps on edges 1..64; chaining add on
// edge 65, after which done is high for one cycle and digest is valid
// and held until the next block finishes or reset. LATENCY = 65 clocks.
// start while busy and writes while busy are ignored (own choice, so a
// running block cannot be corrupted). The step order, constants and
// round functions follow the MD5 algorithm; the one-step-per-clock
// schedule and the handshake details are this design's choice.
module md5_core
  import md5_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic         write,
  input  logic [3:0]   writeaddr,
  input  logic [31:0]  writedata,
  input  logic         start,
  output logic         done,
  output logic         busy,
  output logic [127:0] digest
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_ADD} state_t;

  state_t      state;
  logic [5:0]  step;
  word_t       msg [16];
  word_t       a0, b0, c0, d0;
  word_t       a, b, c, d;
  word_t       b_next;

  // One MD5 step: B' = B + rotl(A + F(B,C,D) + K[i] + M[g], s[i])
  always_comb begin
    b_next = b + rotl(a + md5_f(step[5:4], b, c, d) + K[step] + msg[md5_g(step)],
                      md5_s(step[5:4], step[1:0]));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
      a0 <= A0_INIT; b0 <= B0_INIT; c0 <= C0_INIT; d0 <= D0_INIT;
      a  <= '0; b <= '0; c <= '0; d <= '0;
      for (int i = 0; i < 16; i++) msg[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (write) msg[writeaddr] <= writedata;
          if (start) begin
            a <= a0; b <= b0; c <= c0; d <= d0;
            step  <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          a <= d;
          b <= b_next;
          c <= b;
          d <= c;
          step <= step + 6'd1;
          if (step == 6'(STEPS - 1)) state <= S_ADD;
        end
        default: begin  // S_ADD
          a0 <= a0 + a; b0 <= b0 + b; c0 <= c0 + c; d0 <= d0 + d;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy   = (state != S_IDLE);
  assign digest = {a0, b0, c0, d0};

endmodule
