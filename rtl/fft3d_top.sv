// fft3d_top: pipelined three-dimensional FFT for a continuous stream of
// data sets of 2^(3*LOG_N) complex 32-bit samples (256^3 by default), one
// sample per clock.
//
// The 3D FFT is computed one dimension at a time by three identical 1D FFTs
// in a chain, with permutations in between that bring each dimension into
// the lowest index bits (fastest varying) for the next FFT:
//
//   in -> FFT(dim 1) -> BRAM: bit reversal + transposition (dim1 <-> dim2)
//      -> FFT(dim 2) -> bit reversal -> SDRAM: 3D rotation (locked burst bits)
//      -> auxiliary permutation of the locked bits -> FFT(dim 3)
//      -> bit reversal -> out
//
// Input order: index bits [LOG_N-1:0] = n1, [2LOG_N-1:LOG_N] = n2,
// [3LOG_N-1:2LOG_N] = n3 (natural order, n1 fastest). Output order: k3
// fastest, then k2, then k1, all in natural order, each value being
// X[k1,k2,k3] / N^3 (every FFT stage halves). The structure follows the
// document; the output order k3,k2,k1 results from the rotation chosen here.
//
// The external SDRAM holding the data set for the 3D rotation is reached
// through the mem_* port (see sdram_perm); its controller and the memory
// itself are outside this design.
//
// Timing: a data set is output completely only while the next one is fed in
// (every stage is an in-place pipeline). In a continuous stream the first
// output sample of a data set appears about 2^(3LOG_N) + 2^(2LOG_N) +
// 2^(LOG_N+LOCK) + 2*2^LOG_N + 3 FFT latencies clocks after its first input
// sample, plus the SDRAM read latency.
module fft3d_top
  import fft3d_pkg::*;
#(
  parameter int unsigned LOG_N = 8,
  parameter int unsigned LOCK  = 4,
  parameter int unsigned ITER  = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  sample_t            in,
  output logic               out_valid,
  output sample_t            out,
  // external SDRAM controller port
  output logic               mem_valid,
  output logic               mem_burst_start,
  output logic [3*LOG_N-1:0] mem_addr,
  output logic               mem_we,
  output sample_t            mem_wdata,
  output logic               mem_re,
  input  logic               mem_rvalid,
  input  sample_t            mem_rdata
);
  logic    v_f1, v_bram, v_f2, v_br2, v_sd, v_aux, v_f3;
  sample_t d_f1, d_bram, d_f2, d_br2, d_sd, d_aux, d_f3;

  fft256 #(.LOG_N(LOG_N), .ITER(ITER)) u_fft1 (
    .clk, .rst_n, .in_valid, .in, .out_valid(v_f1), .out(d_f1)
  );

  bram_perm #(.LOG_N(LOG_N)) u_bram (
    .clk, .rst_n, .in_valid(v_f1), .in(d_f1), .out_valid(v_bram), .out(d_bram)
  );

  fft256 #(.LOG_N(LOG_N), .ITER(ITER)) u_fft2 (
    .clk, .rst_n, .in_valid(v_bram), .in(d_bram), .out_valid(v_f2), .out(d_f2)
  );

  bitrev_perm #(.LOG_N(LOG_N)) u_bitrev2 (
    .clk, .rst_n, .in_valid(v_f2), .in(d_f2), .out_valid(v_br2), .out(d_br2)
  );

  sdram_perm #(.LOG_N(LOG_N), .LOCK(LOCK)) u_sdram (
    .clk, .rst_n, .in_valid(v_br2), .in(d_br2), .out_valid(v_sd), .out(d_sd),
    .mem_valid, .mem_burst_start, .mem_addr, .mem_we, .mem_wdata, .mem_re,
    .mem_rvalid, .mem_rdata
  );

  aux_perm #(.LOG_N(LOG_N), .LOCK(LOCK)) u_aux (
    .clk, .rst_n, .in_valid(v_sd), .in(d_sd), .out_valid(v_aux), .out(d_aux)
  );

  fft256 #(.LOG_N(LOG_N), .ITER(ITER)) u_fft3 (
    .clk, .rst_n, .in_valid(v_aux), .in(d_aux), .out_valid(v_f3), .out(d_f3)
  );

  bitrev_perm #(.LOG_N(LOG_N)) u_bitrev3 (
    .clk, .rst_n, .in_valid(v_f3), .in(d_f3), .out_valid, .out
  );

endmodule
