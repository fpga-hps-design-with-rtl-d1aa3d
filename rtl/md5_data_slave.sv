// md5_data_slave: Avalon-MM data slave for an array of MD5 cores.
//
// The word address is {core, word}: the low 4 bits pick a word, the bits
// above pick the core. A write stores writedata as message word M[word]
// of that core: the decoder registers the word, its index and a per-core
// write strobe, which reach the core one clock after the Avalon write. A
// read returns digest word 'word' (0..3 = a0, b0, c0, d0) of that core,
// and 0 for words 4..15; readdata is registered (read latency 1).
// Message words are not read back. The split of write path (decoder and
// registers) and read path (multiplexer and register) follows the MD5
// slave interface diagram; the address layout is this design's choice.
module md5_data_slave #(
  parameter int unsigned N_CORES = 32,
  localparam int unsigned CW     = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned AW     = CW + 4
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic [AW-1:0]             avs_address,
  input  logic                      avs_read,
  input  logic                      avs_write,
  input  logic [31:0]               avs_writedata,
  output logic [31:0]               avs_readdata,
  output logic [N_CORES-1:0]        core_write,
  output logic [3:0]                core_writeaddr,
  output logic [31:0]               core_writedata,
  input  logic [N_CORES-1:0][127:0] core_digest
);

  logic [CW-1:0] sel;
  logic [3:0]    word;
  logic [127:0]  dig;
  logic [31:0]   rd_word;

  assign sel  = avs_address[AW-1:4];
  assign word = avs_address[3:0];

  always_comb begin
    dig     = (32'(sel) < N_CORES) ? core_digest[sel] : '0;
    rd_word = '0;
    if (word[3:2] == 2'b00) rd_word = dig[127 - 32*word[1:0] -: 32];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      core_write     <= '0;
      core_writeaddr <= '0;
      core_writedata <= '0;
      avs_readdata   <= '0;
    end else begin
      core_write <= '0;
      if (avs_write) begin
        for (int i = 0; i < N_CORES; i++)
          core_write[i] <= (32'(sel) == i);
        core_writeaddr <= word;
        core_writedata <= avs_writedata;
      end
      if (avs_read) avs_readdata <= rd_word;
    end
  end

  a_rw_exclusive: assert property (@(posedge clk) disable iff (reset)
    !(avs_read && avs_write));

endmodule
