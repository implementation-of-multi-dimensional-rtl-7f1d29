// tb_fft256: runs frames of random and single-tone data through the
// 256-point pipelined FFT and compares every output with a floating-point
// DFT scaled by 1/N, taking the bit-reversed output order into account.
// Checks the latency of the first output (N - 1 + (LOG_N-1)*(ITER+2) + 1
// clocks) and, in later frames, operation with gaps in the input stream.
module tb_fft256;
  import fft3d_pkg::*;

  localparam int unsigned LOG_N  = 8;
  localparam int unsigned ITER   = 14;
  localparam int unsigned N      = 1 << LOG_N;
  localparam int          FRAMES = 4;          // checked frames
  localparam real         TOL    = 8.0;        // LSBs, plus 0.1 % of the value
  localparam real         PI     = 3.14159265358979323846;
  localparam int          LAT    = N - 1 + (LOG_N - 1) * (ITER + 2) + 1;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;

  initial #1 rst_n = 1'b0;     // a reset edge before the first clock
  logic    in_valid = 1'b0;
  sample_t in = '0;
  logic    out_valid;
  sample_t out;

  int checks = 0, failures = 0;
  comp_t got_re, got_im;
  assign got_re = out.re;
  assign got_im = out.im;
  int cycle = 0, t_first_in = -1, t_first_out = -1;

  fft256 #(.LOG_N(LOG_N), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  real xr [FRAMES+1][N];
  real xi [FRAMES+1][N];

  function automatic int bitrev(input int v);
    int r = 0;
    for (int b = 0; b < LOG_N; b++) if (v[b]) r |= 1 << (LOG_N - 1 - b);
    return r;
  endfunction

  int out_cnt = 0;
  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      int f, p, k;
      real er, ei, tol;
      f = out_cnt / N;
      p = out_cnt % N;
      if (t_first_out < 0) t_first_out = cycle;
      if (f < FRAMES) begin
        k  = bitrev(p);
        er = 0.0; ei = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a  = -2.0 * PI * real'((n * k) % N) / real'(N);
          er += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
          ei += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
        end
        er /= real'(N); ei /= real'(N);
        tol = TOL + ((er < 0.0 ? -er : er) + (ei < 0.0 ? -ei : ei)) / 1000.0;
        checks++;
        if ((real'(got_re) - er > tol) || (er - real'(got_re) > tol) ||
            (real'(got_im) - ei > tol) || (ei - real'(got_im) > tol)) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bin %0d: got (%0.0f,%0.0f) expected (%0.1f,%0.1f)",
                     f, k, real'(got_re), real'(got_im), er, ei);
        end
      end
      out_cnt++;
    end
  end

  initial begin
    for (int f = 0; f <= FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f == 1) begin   // a tone on bin 37 with amplitude 20000
          xr[f][n] = $floor(20000.0 * $cos(2.0 * PI * 37.0 * n / N) + 0.5);
          xi[f][n] = $floor(20000.0 * $sin(2.0 * PI * 37.0 * n / N) + 0.5);
        end else begin
          xr[f][n] = real'($signed($urandom_range(0, 40000)) - 20000);
          xi[f][n] = real'($signed($urandom_range(0, 40000)) - 20000);
        end
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f <= FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        // frames 2 and later have random gaps
        while (f >= 2 && $urandom_range(0, 4) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in.re = comp_t'($rtoi(xr[f][n]));
        in.im = comp_t'($rtoi(xi[f][n]));
        if (t_first_in < 0) t_first_in = cycle;
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 20) @(posedge clk);
    checks++;
    if (t_first_out - t_first_in != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", t_first_out - t_first_in, LAT);
    end
    checks++;
    if (out_cnt < FRAMES * N) begin
      failures++;
      $display("only %0d outputs", out_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
