// fft_sdf_stage: one radix-2 decimation-in-frequency stage of a single-path
// delay-feedback (SDF) pipelined FFT, with its twiddle rotation.
//
// How it works: a delay line of D = 2^LOG_D samples holds the first half of
// each block of 2*D input samples. While the second half arrives, each sample
// b is paired with the stored sample a from D positions earlier; (a+b)/2 goes
// out at once and (a-b)/2 goes back into the delay line. During the first
// half of the next block the stored differences go out, each rotated by the
// twiddle W_{2D}^n = exp(-j*2*pi*n/(2*D)) for its position n in the half.
// Sums are rotated by angle 0 so every sample sees the same latency. The
// division by two in each stage keeps the result in range (overall scaling
// 1/N per FFT); this scaling, the SDF structure and the use of a CORDIC for
// every twiddle are this design's choices, the original paper only fixing a
// pipelined FFT with CORDIC twiddles.
//
// Interface: the stage advances only on in_valid (gaps are allowed). Output
// samples appear ROT_LAT clocks after the input that produced them
// (ROT_LAT = ITER + 2, or 1 when LOG_D = 0 where no twiddle is needed). The
// differences of a block leave only when the next block enters, so a stream
// must be followed by more input to flush it.
module fft_sdf_stage
  import fft3d_pkg::*;
#(
  parameter int unsigned LOG_D = 7,
  parameter int unsigned ITER  = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);
  localparam int unsigned D  = 1 << LOG_D;
  localparam int unsigned PW = (LOG_D == 0) ? 1 : LOG_D;

  logic [LOG_D:0]  cnt;          // position in the block of 2*D samples
  logic            primed;       // the delay line holds differences
  logic [PW-1:0]   ptr;
  logic            second_half;
  sample_t         dline [D];
  sample_t         a, bfly_out, dline_in;
  angle_t          twiddle;
  logic            bfly_valid;

  assign second_half = cnt[LOG_D];
  if (LOG_D == 0) begin : g_ptr0
    assign ptr = '0;
  end else begin : g_ptr
    assign ptr = cnt[PW-1:0];
  end
  assign a = dline[ptr];

  function automatic comp_t half_sum(input comp_t x, input comp_t y);
    logic signed [SAMPLE_W:0] s;
    s = {x[SAMPLE_W-1], x} + {y[SAMPLE_W-1], y};
    return comp_t'(s >>> 1);
  endfunction

  function automatic comp_t half_diff(input comp_t x, input comp_t y);
    logic signed [SAMPLE_W:0] s;
    s = {x[SAMPLE_W-1], x} - {y[SAMPLE_W-1], y};
    return comp_t'(s >>> 1);
  endfunction

  always_comb begin
    if (second_half) begin
      bfly_out.re = half_sum(a.re, in.re);
      bfly_out.im = half_sum(a.im, in.im);
      dline_in.re = half_diff(a.re, in.re);
      dline_in.im = half_diff(a.im, in.im);
      twiddle     = '0;
    end else begin
      bfly_out    = a;
      dline_in    = in;
      // -2*pi*n/(2*D) in units of 2^16 per turn
      twiddle     = angle_t'(-(32'(ptr) << (ANGLE_W - 1 - LOG_D)));
    end
    bfly_valid = in_valid && (second_half || primed);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (in_valid) begin
      cnt <= cnt + 1'b1;
      if (second_half) primed <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) dline[ptr] <= dline_in;
  end

  if (LOG_D == 0) begin : g_notw
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out       <= '0;
      end else begin
        out_valid <= bfly_valid;
        out       <= bfly_out;
      end
    end
  end else begin : g_tw
    cordic_rotator #(.ITER(ITER)) u_rot (
      .clk, .rst_n,
      .in_valid (bfly_valid),
      .in       (bfly_out),
      .angle    (twiddle),
      .out_valid,
      .out
    );
  end

endmodule
