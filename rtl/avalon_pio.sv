// avalon_pio: the simplest Avalon-MM slave, a write-only output port.
//
// A WIDTH-bit register loads writedata when write is high at a rising
// clock edge and drives pio_out, the application-specific side. There
// is no address and no read path. The register with write as its clock
// enable is the example peripheral of the Avalon documentation; the
// synchronous reset to 0 is this design's addition.
module avalon_pio #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             write,
  input  logic [WIDTH-1:0] writedata,
  output logic [WIDTH-1:0] pio_out
);

  always_ff @(posedge clk) begin
    if (reset)      pio_out <= '0;
    else if (write) pio_out <= writedata;
  end

endmodule
