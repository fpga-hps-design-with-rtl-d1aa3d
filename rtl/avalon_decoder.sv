// avalon_decoder: minimal Avalon-MM interconnect, one master to two slaves.
//
// The master presents byte addresses, as a processor bridge does. A slave
// is selected when the address lies in its window [BASE, BASE + 4*2^AW);
// each window must be aligned to its size. The slave receives the word
// address (byte address divided by 4, window offset removed) and read or
// write qualified by its select; writedata is shared. Both slaves answer
// with a fixed read latency of 1, so the decoder remembers which slave a
// read went to and returns its readdata one clock later with
// readdatavalid. A read outside both windows returns 0 with readdatavalid,
// a write there is dropped. This plays the part of the interconnect the
// system generator builds between the lightweight HPS-to-FPGA bridge and
// the custom slaves; the window sizes of the Lab 4 system follow its
// address map, the rest is this design's choice.
module avalon_decoder #(
  parameter int unsigned ADDR_W  = 21,
  parameter logic [31:0] S0_BASE = 32'h0000_0000,
  parameter int unsigned S0_AW   = 4,
  parameter logic [31:0] S1_BASE = 32'h0000_0040,
  parameter int unsigned S1_AW   = 4
) (
  input  logic              clk,
  input  logic              reset,
  // master side
  input  logic [ADDR_W-1:0] m_address,
  input  logic              m_read,
  input  logic              m_write,
  input  logic [31:0]       m_writedata,
  output logic [31:0]       m_readdata,
  output logic              m_readdatavalid,
  // slave 0
  output logic [S0_AW-1:0]  s0_address,
  output logic              s0_read,
  output logic              s0_write,
  output logic [31:0]       s0_writedata,
  input  logic [31:0]       s0_readdata,
  // slave 1
  output logic [S1_AW-1:0]  s1_address,
  output logic              s1_read,
  output logic              s1_write,
  output logic [31:0]       s1_writedata,
  input  logic [31:0]       s1_readdata
);

  logic [31:0] addr;
  logic        hit0, hit1;
  logic [1:0]  rsel;  // which slave the read of the previous clock went to

  assign addr = 32'(m_address);
  assign hit0 = (addr >> (S0_AW + 2)) == (S0_BASE >> (S0_AW + 2));
  assign hit1 = !hit0 && ((addr >> (S1_AW + 2)) == (S1_BASE >> (S1_AW + 2)));

  assign s0_address   = addr[S0_AW+1:2];
  assign s1_address   = addr[S1_AW+1:2];
  assign s0_read      = m_read  && hit0;
  assign s0_write     = m_write && hit0;
  assign s1_read      = m_read  && hit1;
  assign s1_write     = m_write && hit1;
  assign s0_writedata = m_writedata;
  assign s1_writedata = m_writedata;

  always_ff @(posedge clk) begin
    if (reset) begin
      rsel            <= '0;
      m_readdatavalid <= 1'b0;
    end else begin
      rsel            <= {s1_read, s0_read};
      m_readdatavalid <= m_read;
    end
  end

  always_comb begin
    unique case (rsel)
      2'b01:   m_readdata = s0_readdata;
      2'b10:   m_readdata = s1_readdata;
      default: m_readdata = '0;
    endcase
  end

  initial assert ((S0_BASE & ((32'd4 << S0_AW) - 1)) == 0 &&
                  (S1_BASE & ((32'd4 << S1_AW) - 1)) == 0)
    else $error("avalon_decoder: slave windows must be aligned to their size");

  a_rw_exclusive: assert property (@(posedge clk) disable iff (reset)
    !(m_read && m_write));

endmodule
