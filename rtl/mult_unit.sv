// mult_unit: the Lab 4 multiplier, 16 x 16 -> 32 bits, unsigned.
//
// While enable is high the product of mult_a and mult_b is registered
// into mult_result and mult_done goes high; both hold until reset (a
// synchronous, active-high reset that clears result and done). One clock
// from enable to done. The port list follows the Lab 4 top level; the
// inside (a single registered product) is the simplest circuit with that
// behaviour, since the lab treats the multiplier as a given block.
module mult_unit (
  input  logic        clk,
  input  logic        reset,
  input  logic        enable,
  input  logic [15:0] mult_a,
  input  logic [15:0] mult_b,
  output logic        mult_done,
  output logic [31:0] mult_result
);

  always_ff @(posedge clk) begin
    if (reset) begin
      mult_result <= '0;
      mult_done   <= 1'b0;
    end else if (enable) begin
      mult_result <= 32'(mult_a) * 32'(mult_b);
      mult_done   <= 1'b1;
    end
  end

endmodule
