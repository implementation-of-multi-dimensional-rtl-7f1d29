// cordic_rotator: pipelined CORDIC that rotates a complex sample by an angle.
//
// out = in * exp(j*angle), with the CORDIC gain removed. The twiddle
// multiplications of the FFT are made this way, with no multiplier blocks:
// ITER shift-and-add micro-rotations (14 by default, the precision the
// document gives for its CORDIC). The design around them is this design's
// own: a quadrant pre-rotation by +-90 degrees first, so that any angle in
// [-pi, pi) converges; ZFRAC extra fraction bits on the residual angle;
// FRAC guard bits below the binary point; and a final
// constant multiply by 1/K (K = CORDIC gain, 1.64676 for 14 iterations),
// rounded and saturated back to SAMPLE_W bits.
//
// Interface: in_valid/in/angle are taken every clock; out_valid/out follow
// LATENCY = ITER + 2 clocks later. There is no stall: the pipeline always
// advances, and the valid bit travels with the data. Angle format is that of
// fft3d_pkg (2^16 per turn).
module cordic_rotator
  import fft3d_pkg::*;
#(
  parameter int unsigned ITER = 14,
  parameter int unsigned FRAC = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  input  angle_t  angle,
  output logic    out_valid,
  output sample_t out
);
  localparam int unsigned IW = SAMPLE_W + 2 + FRAC;   // integer growth + guard
  // round(2^15 / K) for the default 14 iterations
  localparam logic signed [16:0] INV_GAIN = 17'sd19898;

  typedef logic signed [IW-1:0] wide_t;

  wide_t  x_q [ITER+1];
  wide_t  y_q [ITER+1];
  zangle_t z_q [ITER+1];
  zangle_t zin;
  assign zin = zangle_t'(angle) <<< ZFRAC;
  logic   v_q [ITER+1];

  // Stage 0: quadrant pre-rotation so that |z| <= pi/2
  wide_t xin, yin;
  assign xin = wide_t'(in.re) <<< FRAC;
  assign yin = wide_t'(in.im) <<< FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q[0] <= '0; y_q[0] <= '0; z_q[0] <= '0; v_q[0] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      if (angle > angle_t'(16384)) begin           // > +90 deg: multiply by j
        x_q[0] <= -yin;  y_q[0] <= xin;  z_q[0] <= zin - (zangle_t'(16384) <<< ZFRAC);
      end else if (angle < -angle_t'(16384)) begin // < -90 deg: multiply by -j
        x_q[0] <= yin;   y_q[0] <= -xin; z_q[0] <= zin + (zangle_t'(16384) <<< ZFRAC);
      end else begin
        x_q[0] <= xin;   y_q[0] <= yin;  z_q[0] <= zin;
      end
    end
  end

  // Stages 1..ITER: micro-rotations
  for (genvar i = 0; i < ITER; i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x_q[i+1] <= '0; y_q[i+1] <= '0; z_q[i+1] <= '0; v_q[i+1] <= 1'b0;
      end else begin
        v_q[i+1] <= v_q[i];
        if (!z_q[i][ZW-1]) begin
          x_q[i+1] <= x_q[i] - (y_q[i] >>> i);
          y_q[i+1] <= y_q[i] + (x_q[i] >>> i);
          z_q[i+1] <= z_q[i] - cordic_atan(i);
        end else begin
          x_q[i+1] <= x_q[i] + (y_q[i] >>> i);
          y_q[i+1] <= y_q[i] - (x_q[i] >>> i);
          z_q[i+1] <= z_q[i] + cordic_atan(i);
        end
      end
    end
  end

  // Final stage: gain compensation, rounding, saturation
  localparam int unsigned PW = IW + 17;
  localparam int unsigned SH = 15 + FRAC;
  typedef logic signed [PW-1:0] prod_t;

  function automatic comp_t scale_sat(input wide_t v);
    prod_t p;
    prod_t r;
    p = prod_t'(v) * prod_t'(INV_GAIN);
    r = (p + (prod_t'(1) <<< (SH - 1))) >>> SH;
    if (r > prod_t'(32767))       return comp_t'(32767);
    else if (r < prod_t'(-32768)) return comp_t'(-32768);
    else                          return comp_t'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= v_q[ITER];
      out.re    <= scale_sat(x_q[ITER]);
      out.im    <= scale_sat(y_q[ITER]);
    end
  end

endmodule
