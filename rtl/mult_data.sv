// mult_data: Avalon-MM data slave of the Lab 4 multiplier.
//
// Word addresses: a write to 0 loads operand in1, a write to 1 loads
// in2; only writedata[15:0] is kept, zero extended to 32 bits, since the
// multiplier takes 16-bit operands. A read of 0 returns the product, 1
// in1, 2 in2, anything else 0. readdata is registered (read latency 1);
// a read in the same clock as a write takes priority. Operands and
// readdata clear on reset. This follows the Lab 4 data slave: its
// address map, the 16-bit operand truncation and the registered read.
// writedata[31:16] is deliberately unused (lint warns about it).
module mult_data (
  input  logic        clk,
  input  logic        reset,
  input  logic [3:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic [31:0] mult_in1,
  output logic [31:0] mult_in2,
  input  logic [31:0] mult_result
);

  always_ff @(posedge clk) begin
    if (reset) begin
      mult_in1     <= '0;
      mult_in2     <= '0;
      avs_readdata <= '0;
    end else if (avs_read) begin
      unique case (avs_address)
        4'd0:    avs_readdata <= mult_result;
        4'd1:    avs_readdata <= mult_in1;
        4'd2:    avs_readdata <= mult_in2;
        default: avs_readdata <= '0;
      endcase
    end else if (avs_write) begin
      unique case (avs_address)
        4'd0:    mult_in1 <= {16'h0000, avs_writedata[15:0]};
        4'd1:    mult_in2 <= {16'h0000, avs_writedata[15:0]};
        default: ;
      endcase
    end
  end

endmodule
