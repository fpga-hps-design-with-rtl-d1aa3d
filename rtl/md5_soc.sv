// md5_soc: FPGA side of the MD5 hashing SoC.
//
// N_CORES independent md5_core instances sit behind two Avalon-MM slaves
// that a processor reaches through one Avalon-MM master port (the
// lightweight HPS-to-FPGA bridge side), split by avalon_decoder:
//   data slave    bytes DATA_BASE + 4*{core, word}: write message word
//                 M[word] of a core, read digest word 0..3 of a core
//   control slave bytes CTRL_BASE + 4*n: n=0 start (write) / busy (read),
//                 n=1 soft reset per core, n=2 sticky done flags
// Software loads a block into one or more cores, starts any set of them
// with one write, polls the done word and reads the digests; cores run
// in parallel, each 65 clocks per block. A core's soft reset bit restores
// its MD5 initial value before a new message; blocks of a longer message
// are chained by loading and starting the same core again without reset.
// The master port has a fixed read latency of 1 with readdatavalid and
// no waitrequest. The array of cores behind control and data slaves
// follows the project description (1 or 32 cores); the address map is
// this design's choice.
module md5_soc #(
  parameter int unsigned N_CORES   = 32,
  parameter int unsigned ADDR_W    = 21,
  parameter logic [31:0] DATA_BASE = 32'h0000_0000,
  parameter logic [31:0] CTRL_BASE = 32'h0000_0800
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

  localparam int unsigned CW      = (N_CORES > 1) ? $clog2(N_CORES) : 1;
  localparam int unsigned DATA_AW = CW + 4;

  // slave-side buses
  logic [DATA_AW-1:0] d_address;
  logic               d_read, d_write;
  logic [31:0]        d_writedata, d_readdata;
  logic [3:0]         c_address;
  logic               c_read, c_write;
  logic [31:0]        c_writedata, c_readdata;

  // core-side signals
  logic [N_CORES-1:0]        core_start, core_soft_reset, core_done, core_busy;
  logic [N_CORES-1:0]        core_write;
  logic [3:0]                core_writeaddr;
  logic [31:0]               core_writedata;
  logic [N_CORES-1:0][127:0] core_digest;

  avalon_decoder #(
    .ADDR_W(ADDR_W),
    .S0_BASE(DATA_BASE), .S0_AW(DATA_AW),
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

  md5_data_slave #(.N_CORES(N_CORES)) u_data (
    .clk, .reset,
    .avs_address(d_address), .avs_read(d_read), .avs_write(d_write),
    .avs_writedata(d_writedata), .avs_readdata(d_readdata),
    .core_write, .core_writeaddr, .core_writedata, .core_digest
  );

  md5_ctrl_slave #(.N_CORES(N_CORES)) u_ctrl (
    .clk, .reset,
    .avs_address(c_address), .avs_read(c_read), .avs_write(c_write),
    .avs_writedata(c_writedata), .avs_readdata(c_readdata),
    .core_start, .core_reset(core_soft_reset), .core_done, .core_busy
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    md5_core u_core (
      .clk,
      .reset    (reset || core_soft_reset[i]),
      .write    (core_write[i]),
      .writeaddr(core_writeaddr),
      .writedata(core_writedata),
      .start    (core_start[i]),
      .done     (core_done[i]),
      .busy     (core_busy[i]),
      .digest   (core_digest[i])
    );
  end

endmodule
