// aux_perm: auxiliary permutation circuit after the SDRAM ("bit-dim perm").
//
// SDRAM is read and written in bursts, so the LOCK lowest index bits (the
// position inside a burst) cannot be moved by the SDRAM permutation. This
// circuit finishes the 3D rotation by exchanging those locked bits
// (positions 0..LOCK-1) with the bits the SDRAM permutation parked at
// LOG_N..LOG_N+LOCK-1, which are the lowest bits of dimension 3. It works on
// windows of 2^(LOG_N+LOCK) samples (4096 by default) in one on-chip buffer
// (stream_perm, period 2). That the locked bits are exchanged in a small
// on-chip circuit, that there are four of them, and that the SDRAM parks the
// bits meant for the locked positions exactly where the locked bits must go
// (so the circuit is a plain exchange) follows the original paper; the
// resulting 4096-sample window is derived from that.
//
// Interface and timing as stream_perm: latency 2^(LOG_N+LOCK) + 1 clocks.
module aux_perm
  import fft3d_pkg::*;
#(
  parameter int unsigned LOG_N = 8,
  parameter int unsigned LOCK  = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);
  stream_perm #(.AW(LOG_N + LOCK), .DEST(aux_map(LOG_N, LOCK))) u_perm (
    .clk, .rst_n, .in_valid, .in, .out_valid, .out
  );
endmodule
