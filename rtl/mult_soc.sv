// mult_soc: FPGA side of the Lab 4 system, a multiplier run by software.
//
// One Avalon-MM master port (the lightweight HPS-to-FPGA bridge side)
// reaches two slaves through avalon_decoder, at the byte addresses of the
// lab's system: mult_data at 0x00-0x3f (word 0 product / in1 write,
// word 1 in1 read / in2 write, word 2 in2), mult_control at 0x40-0x7f
// (word 0 start, word 1 reset, word 2 done). The multiplier takes
// in1[15:0] and in2[15:0], is enabled by start bit 0 and reset by reset
// bit 0; its done flag is read at control word 2. Software: set reset,
// clear it, write both operands, set start, poll done, read the product.
// The master port has a fixed read latency of 1 with readdatavalid.
// The system reset is OR-ed into the multiplier's reset so it starts
// cleared (own choice; the lab drives it from the reset register only).
// Only bit 0 of the start and reset registers and bits 15:0 of the
// operand registers are used; the unused-bit lint warnings stand for that.
module mult_soc #(
  parameter int unsigned ADDR_W    = 21,
  parameter logic [31:0] DATA_BASE = 32'h0000_0000,
  parameter logic [31:0] CTRL_BASE = 32'h0000_0040
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] avm_address,
  input  logic              avm_read,
  input  logic              avm_write,
  input  logic [31:0]       avm_writedata,
  output logic [31:0]       avm_readdata,
  output logic              avm_readdatavalid
);

  logic [3:0]  d_address, c_address;
  logic        d_read, d_write, c_read, c_write;
  logic [31:0] d_writedata, d_readdata, c_writedata, c_readdata;
  logic [31:0] in1, in2, result, start, soft_reset;
  logic        done;

  avalon_decoder #(
    .ADDR_W(ADDR_W),
    .S0_BASE(DATA_BASE), .S0_AW(4),
    .S1_BASE(CTRL_BASE), .S1_AW(4)
  ) u_decoder (
    .clk, .reset,
    .m_address(avm_address), .m_read(avm_read), .m_write(avm_write),
    .m_writedata(avm_writedata), .m_readdata(avm_readdata),
    .m_readdatavalid(avm_readdatavalid),
    .s0_address(d_address), .s0_read(d_read), .s0_write(d_write),
    .s0_writedata(d_writedata), .s0_readdata(d_readdata),
    .s1_address(c_address), .s1_read(c_read), .s1_write(c_write),
    .s1_writedata(c_writedata), .s1_readdata(c_readdata)
  );

  mult_data u_data (
    .clk, .reset,
    .avs_address(d_address), .avs_read(d_read), .avs_write(d_write),
    .avs_writedata(d_writedata), .avs_readdata(d_readdata),
    .mult_in1(in1), .mult_in2(in2), .mult_result(result)
  );

  mult_control u_control (
    .clk, .reset,
    .avs_address(c_address), .avs_read(c_read), .avs_write(c_write),
    .avs_writedata(c_writedata), .avs_readdata(c_readdata),
    .mult_start(start), .mult_reset(soft_reset), .mult_done({31'd0, done})
  );

  mult_unit u_mult (
    .clk,
    .reset      (reset || soft_reset[0]),
    .enable     (start[0]),
    .mult_a     (in1[15:0]),
    .mult_b     (in2[15:0]),
    .mult_done  (done),
    .mult_result(result)
  );

endmodule
