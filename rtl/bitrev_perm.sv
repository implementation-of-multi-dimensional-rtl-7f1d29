// bitrev_perm: LOG_N-bit reversal (8 bits by default) after the second and
// third 1D FFT, putting each FFT's output from bit-reversed into natural
// frequency order.
//
// Built as an in-place single-buffer permutation of 2^LOG_N samples
// (stream_perm): bit j < LOG_N moves to LOG_N-1-j, the mapping alternates
// between two address orders (period 2). The original paper only names a bit
// reversal circuit of minimum resources; this single-buffer form is this
// design's choice.
//
// Interface and timing as stream_perm: latency 2^LOG_N + 1 clocks.
module bitrev_perm
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
  stream_perm #(.AW(LOG_N), .DEST(bitrev_map(LOG_N))) u_perm (
    .clk, .rst_n, .in_valid, .in, .out_valid, .out
  );
endmodule
