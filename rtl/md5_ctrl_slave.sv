// md5_ctrl_slave: Avalon-MM control slave for an array of MD5 cores.
//
// One register bit per core in each of three 32-bit words (word address):
//   0  write: 1-bits start the matching cores (one-clock start pulse,
//             the register clears itself); read: busy flags of the cores
//   1  read/write: soft-reset register, a core is held in reset while its
//      bit is 1 (software writes 1 and then 0, as in the Lab 4 flow)
//   2  read: done flags. A core's done pulse sets its flag; the flag stays
//      set until the core is started or reset again, so software can poll.
// Other addresses read 0. Like the Lab 4 slaves, a write decoder feeds
// registers that drive the cores, and a read multiplexer feeds a
// registered readdata: read data appears the clock after read (fixed read
// latency 1, no waitrequest). The register layout (start, reset, done at
// words 0, 1, 2) follows the Lab 4 multiplier control slave; the
// self-clearing start and the sticky done flags are this design's choice.
// N_CORES may be 1..32 so that one word holds one bit per core.
module md5_ctrl_slave #(
  parameter int unsigned N_CORES = 32
) (
  input  logic               clk,
  input  logic               reset,
  input  logic [3:0]         avs_address,
  input  logic               avs_read,
  input  logic               avs_write,
  input  logic [31:0]        avs_writedata,
  output logic [31:0]        avs_readdata,
  output logic [N_CORES-1:0] core_start,
  output logic [N_CORES-1:0] core_reset,
  input  logic [N_CORES-1:0] core_done,
  input  logic [N_CORES-1:0] core_busy
);

  localparam logic [3:0] ADDR_START = 4'd0;
  localparam logic [3:0] ADDR_RESET = 4'd1;
  localparam logic [3:0] ADDR_DONE  = 4'd2;

  logic [N_CORES-1:0] start_q, reset_q, done_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      start_q      <= '0;
      reset_q      <= '0;
      done_q       <= '0;
      avs_readdata <= '0;
    end else begin
      start_q <= '0;
      if (avs_write) begin
        unique case (avs_address)
          ADDR_START: start_q <= avs_writedata[N_CORES-1:0];
          ADDR_RESET: reset_q <= avs_writedata[N_CORES-1:0];
          default: ;
        endcase
      end
      done_q <= (done_q & ~start_q & ~reset_q) | core_done;
      if (avs_read) begin
        unique case (avs_address)
          ADDR_START: avs_readdata <= 32'(core_busy);
          ADDR_RESET: avs_readdata <= 32'(reset_q);
          ADDR_DONE:  avs_readdata <= 32'(done_q);
          default:    avs_readdata <= '0;
        endcase
      end
    end
  end

  assign core_start = start_q;
  assign core_reset = reset_q;

  initial assert (N_CORES >= 1 && N_CORES <= 32)
    else $error("md5_ctrl_slave: N_CORES must be 1..32");

  a_rw_exclusive: assert property (@(posedge clk) disable iff (reset)
    !(avs_read && avs_write));

endmodule
