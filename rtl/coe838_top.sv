// coe838_top: the two FPGA/HPS example systems and the PIO example side
// by side on one clock and reset.
//
//   md5_*   md5_soc: array of N_CORES MD5 cores behind Avalon-MM control
//           and data slaves (default 32 cores)
//   mult_*  mult_soc: the Lab 4 multiplier behind its control and data
//           slaves
//   pio_*   avalon_pio: the minimal write-only Avalon-MM output register
// Each system has its own Avalon-MM master port, which in the SoC is
// driven by the processor through the lightweight HPS-to-FPGA bridge;
// the processor and the bridges are not part of this RTL. Master ports
// take byte addresses and return read data one clock after read with
// readdatavalid. The systems share nothing but clk and reset.
module coe838_top #(
  parameter int unsigned N_CORES   = 32,
  parameter int unsigned ADDR_W    = 21,
  parameter int unsigned PIO_WIDTH = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  // MD5 system
  input  logic [ADDR_W-1:0]    md5_address,
  input  logic                 md5_read,
  input  logic                 md5_write,
  input  logic [31:0]          md5_writedata,
  output logic [31:0]          md5_readdata,
  output logic                 md5_readdatavalid,
  // Lab 4 multiplier system
  input  logic [ADDR_W-1:0]    mult_address,
  input  logic                 mult_read,
  input  logic                 mult_write,
  input  logic [31:0]          mult_writedata,
  output logic [31:0]          mult_readdata,
  output logic                 mult_readdatavalid,
  // PIO example
  input  logic                 pio_write,
  input  logic [PIO_WIDTH-1:0] pio_writedata,
  output logic [PIO_WIDTH-1:0] pio_out
);

  md5_soc #(.N_CORES(N_CORES), .ADDR_W(ADDR_W)) u_md5 (
    .clk, .reset,
    .avm_address(md5_address), .avm_read(md5_read), .avm_write(md5_write),
    .avm_writedata(md5_writedata), .avm_readdata(md5_readdata),
    .avm_readdatavalid(md5_readdatavalid)
  );

  mult_soc #(.ADDR_W(ADDR_W)) u_mult (
    .clk, .reset,
    .avm_address(mult_address), .avm_read(mult_read), .avm_write(mult_write),
    .avm_writedata(mult_writedata), .avm_readdata(mult_readdata),
    .avm_readdatavalid(mult_readdatavalid)
  );

  avalon_pio #(.WIDTH(PIO_WIDTH)) u_pio (
    .clk, .reset,
    .write(pio_write), .writedata(pio_writedata), .pio_out
  );

endmodule
