// fft256: pipelined 1D FFT of 2^LOG_N points (256 by default), one complex
// sample per clock, as used for each of the three dimensions.
//
// The original paper fixes the size (256 points), the pipelined streaming nature,
// one sample per clock, output in bit-reversed order and twiddles made by a
// 14-bit CORDIC; it takes the FFT design itself from elsewhere. This
// implementation is the simplest pipeline meeting that: LOG_N radix-2 DIF
// single-path delay-feedback stages (fft_sdf_stage) with delays 128, 64, ...,
// 1. Each stage halves its result, so the output is X[k]/N.
//
// Interface: a frame is N consecutive valid input samples in natural order
// x[0..N-1]; the output frame holds X[bitrev(k)]/N at output position k.
// Input may pause (in_valid low); the FFT advances only on valid samples.
// A frame is completely output only after the next frame has entered.
// Latency in a continuous stream: output position 0 of a frame appears
// N - 1 + (LOG_N-1)*(ITER+2) + 1 clocks after input position 0 of that frame
// (N - 1 delay-line clocks plus the pipeline registers of each stage).
module fft256
  import fft3d_pkg::*;
#(
  parameter int unsigned LOG_N = 8,
  parameter int unsigned ITER  = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);
  logic    v [LOG_N+1];
  sample_t d [LOG_N+1];

  assign v[0] = in_valid;
  assign d[0] = in;

  for (genvar s = 0; s < LOG_N; s++) begin : g_stage
    fft_sdf_stage #(.LOG_D(LOG_N - 1 - s), .ITER(ITER)) u_stage (
      .clk, .rst_n,
      .in_valid  (v[s]),
      .in        (d[s]),
      .out_valid (v[s+1]),
      .out       (d[s+1])
    );
  end

  assign out_valid = v[LOG_N];
  assign out       = d[LOG_N];

endmodule
