// mult_control: Avalon-MM control slave of the Lab 4 multiplier.
//
// Word addresses: 0 start register (read/write), 1 reset register
// (read/write), 2 done (read only, the multiplier's done flag zero
// extended); other addresses read 0 and ignore writes. Both registers
// are 32 bits and drive the multiplier directly (its start and reset use
// bit 0). A write decoder loads the registers; a read multiplexer feeds a
// registered readdata, so read data appears the clock after read. The
// registers and multiplexer follow the Lab 4 block diagram and the
// software's use of word 2 as done; the clear-on-reset values are this
// design's choice.
module mult_control (
  input  logic        clk,
  input  logic        reset,
  input  logic [3:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic [31:0] mult_start,
  output logic [31:0] mult_reset,
  input  logic [31:0] mult_done
);

  always_ff @(posedge clk) begin
    if (reset) begin
      mult_start   <= '0;
      mult_reset   <= '0;
      avs_readdata <= '0;
    end else begin
      if (avs_read) begin
        unique case (avs_address)
          4'd0:    avs_readdata <= mult_start;
          4'd1:    avs_readdata <= mult_reset;
          4'd2:    avs_readdata <= mult_done;
          default: avs_readdata <= '0;
        endcase
      end else if (avs_write) begin
        unique case (avs_address)
          4'd0:    mult_start <= avs_writedata;
          4'd1:    mult_reset <= avs_writedata;
          default: ;
        endcase
      end
    end
  end

  a_rw_exclusive: assert property (@(posedge clk) disable iff (reset)
    !(avs_read && avs_write));

endmodule
