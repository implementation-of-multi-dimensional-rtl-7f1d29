// bram_perm: the permutation between the first and second 1D FFT, done in
// on-chip memory (BRAM) for one plane of 2^(2*LOG_N) samples (256 x 256 by
// default, 2 Mbit).
//
// The first FFT delivers dimension-1 frequencies in bit-reversed order in the
// LOG_N lowest index bits and dimension 2 in the next LOG_N bits. As in the
// document, two permutations are merged into one memory pass: the bit
// reversal of the lowest LOG_N bits (natural frequency order) and the
// transposition that swaps the two fields, so the second FFT receives
// dimension 2 in the lowest bits. Index bit j < LOG_N moves to 2*LOG_N-1-j,
// bit j >= LOG_N moves to j-LOG_N; dimension 3 (higher bits) is untouched
// because planes pass through one after another. The mapping has period 4.
//
// Interface and timing as stream_perm: latency 2^(2*LOG_N) + 1 clocks.
module bram_perm
  import fft3d_pkg::*;
#(
  parameter int unsigned LOG_N = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);
  stream_perm #(.AW(2 * LOG_N), .DEST(bram_map(LOG_N))) u_perm (
    .clk, .rst_n, .in_valid, .in, .out_valid, .out
  );
endmodule
