// perm_addr_gen: address generator for an in-place streaming permutation of
// 2^AW samples held in a single buffer.
//
// A stream is permuted frame by frame: output position u of a frame carries
// the input sample whose position t has bit j equal to bit DEST[j] of u
// (index bit j "moves to" position DEST[j]). With one buffer, each incoming
// sample is written to the location just read out, so the write address of
// frame f+1 is the read address of frame f composed with the permutation:
// A_{f+1}(t) = A_f(sigma(t)). For a bit permutation A_f just selects counter
// bits: address bit j = counter bit map[j], with map = identity for the first
// frame and map[j] <= DEST[map[j]] at the end of every frame. The mapping
// repeats with the periodicity of the permutation, so only that many
// different mappings ever occur. The original paper describes exactly this use of
// counter bits applied to the memory through powers of the permutation; the
// register-based composition is this design's way of producing them.
//
// Interface: on every in_valid, addr is the location to read (old sample)
// and then write (new sample) for the current counter value; the counter and,
// at a frame end, the mapping advance on the clock edge. primed is high once
// a whole frame has been written, i.e. when reads return real data. cnt is
// the position of the current sample in its frame.
module perm_addr_gen
  import fft3d_pkg::*;
#(
  parameter int unsigned AW   = 16,
  parameter bitmap_t     DEST = identity_map()
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic [AW-1:0] cnt,
  output logic [AW-1:0] addr,
  output logic          primed,
  output logic          frame_end
);
  localparam int unsigned IW = $clog2(AW) > 0 ? $clog2(AW) : 1;
  typedef logic [IW-1:0] idx_t;

  idx_t map [AW];

  assign frame_end = in_valid && (&cnt);

  always_comb begin
    for (int unsigned j = 0; j < AW; j++) addr[j] = cnt[map[j]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
      for (int unsigned j = 0; j < AW; j++) map[j] <= idx_t'(j);
    end else if (in_valid) begin
      cnt <= cnt + 1'b1;
      if (frame_end) begin
        primed <= 1'b1;
        for (int unsigned j = 0; j < AW; j++) map[j] <= idx_t'(DEST[map[j]]);
      end
    end
  end

endmodule
