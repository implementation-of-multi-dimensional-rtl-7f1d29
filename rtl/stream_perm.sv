// stream_perm: in-place streaming bit-index permutation on one on-chip
// memory of 2^AW samples (BRAM).
//
// Each valid input sample is written into the location whose previous
// content is read out in the same clock (read-before-write), at the address
// given by perm_addr_gen. A memory that is read and written at any time, with
// the only rule that a location is not used twice at once, is what the
// document asks of the BRAM; a single buffer instead of two halves is this
// design's choice, as in the original paper's own in-place SDRAM scheme.
//
// Interface: frames of 2^AW valid samples stream in; the permuted previous
// frame streams out. out_valid follows a valid input by one clock once the
// first frame is stored, so the latency is 2^AW + 1 clocks in a continuous
// stream. The last frame leaves only while a further frame is fed in.
module stream_perm
  import fft3d_pkg::*;
#(
  parameter int unsigned AW   = 16,
  parameter bitmap_t     DEST = identity_map()
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);
  logic [AW-1:0] cnt, addr;
  logic          primed, frame_end;
  sample_t       mem [2**AW];

  perm_addr_gen #(.AW(AW), .DEST(DEST)) u_agen (
    .clk, .rst_n, .in_valid, .cnt, .addr, .primed, .frame_end
  );

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out           <= mem[addr];
      mem[addr]     <= in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && primed;
  end

endmodule
