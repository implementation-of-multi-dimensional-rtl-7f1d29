// sdram_perm: the 3D rotation between the second and third 1D FFT, done
// in place in external SDRAM holding one whole data set of 2^(3*LOG_N)
// samples (256^3 x 32 bit = 64 MB by default).
//
// The incoming order has dimension 2 (frequency) in the lowest LOG_N index
// bits, dimension 1 in the next LOG_N and dimension 3 in the highest; the
// third FFT needs dimension 3 lowest. The rotation is a bit permutation of
// the whole data set, so it needs a full-size external buffer. Following the
// document, it is done in a single buffer: every sample is written where the
// sample it replaces is read from, the address being the sample counter with
// its bits selected through the current power of the permutation
// (perm_addr_gen; period 6 by default). The LOCK lowest address bits always
// equal the lowest counter bits, so every aligned group of 2^LOCK samples is
// one SDRAM burst at consecutive addresses; those locked bits are left for
// aux_perm to move. The bits whose final place the locked bits occupy are
// parked at the final place of the locked bits, as low as possible, so that
// aux_perm only has to exchange the two groups, as the original paper advises.
//
// External memory port (to the SDRAM controller): one access per valid
// sample, carrying both a read and a write of the same address; the memory
// must return the old content before storing the new one. mem_burst_start
// marks the first access of each burst. Read data come back in order with any
// fixed or variable latency (mem_rvalid); they leave as out one clock later.
// The command is registered, so a sample's access appears on the port one
// clock after it enters; the latency of the block is 2^(3*LOG_N) + 2 clocks
// plus the memory's read latency.
// Reads are requested only once a full data set has been written.
// The command scheduling of the original paper (a static schedule with refresh and
// row changes placed between groups of bursts) belongs to the controller and
// is not part of this block.
module sdram_perm
  import fft3d_pkg::*;
#(
  parameter int unsigned LOG_N = 8,
  parameter int unsigned LOCK  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sample_t              in,
  output logic                 out_valid,
  output sample_t              out,
  // external SDRAM controller port
  output logic                 mem_valid,
  output logic                 mem_burst_start,
  output logic [3*LOG_N-1:0]   mem_addr,
  output logic                 mem_we,
  output sample_t              mem_wdata,
  output logic                 mem_re,
  input  logic                 mem_rvalid,
  input  sample_t              mem_rdata
);
  localparam int unsigned AW = 3 * LOG_N;

  logic [AW-1:0] cnt, addr;
  logic          primed, frame_end;

  perm_addr_gen #(.AW(AW), .DEST(sdram_map(LOG_N, LOCK))) u_agen (
    .clk, .rst_n, .in_valid, .cnt, .addr, .primed, .frame_end
  );

  // The memory command leaves through one register stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_valid       <= 1'b0;
      mem_burst_start <= 1'b0;
      mem_addr        <= '0;
      mem_we          <= 1'b0;
      mem_wdata       <= '0;
      mem_re          <= 1'b0;
    end else begin
      mem_valid       <= in_valid;
      mem_burst_start <= in_valid && (cnt[LOCK-1:0] == '0);
      mem_addr        <= addr;
      mem_we          <= in_valid;
      mem_wdata       <= in;
      mem_re          <= in_valid && primed;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= mem_rvalid;
      out       <= mem_rdata;
    end
  end

  // Burst rule: the locked address bits follow the counter unchanged.
  burst_locked: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> addr[LOCK-1:0] == cnt[LOCK-1:0])
    else $error("sdram_perm: locked burst bits moved");

endmodule
