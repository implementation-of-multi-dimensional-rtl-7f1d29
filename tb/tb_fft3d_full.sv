// tb_fft3d_full: one complete 256 x 256 x 256 3D FFT through fft3d_top at
// its default parameters, with the behavioural SDRAM holding the whole
// 2^24-sample data set.
//
// The data set is a single complex tone A*exp(j*2*pi*(K1*n1 + K2*n2 +
// K3*n3)/256), whose scaled 3D DFT is A at bin (K1,K2,K3) and zero elsewhere;
// a second data set of zeros follows to push the first one out. Every one of
// the 2^24 outputs is checked (peak within 0.1 % + 8 LSB, all other bins
// within 8 LSB), and so are the latency of the first output sample, the
// number and alignment of SDRAM bursts and the output order (k3 fastest,
// then k2, then k1).
module tb_fft3d_full;
  import fft3d_pkg::*;

  localparam int unsigned LOG_N  = 8;
  localparam int unsigned LOCK   = 4;
  localparam int unsigned ITER   = 14;
  localparam int unsigned RD_LAT = 6;
  localparam int unsigned N      = 1 << LOG_N;
  localparam int unsigned AW     = 3 * LOG_N;
  localparam int unsigned SIZE   = 1 << AW;
  localparam real         AMP    = 20000.0;
  localparam real         TOL    = 8.0;
  localparam real         PI     = 3.14159265358979323846;
  localparam int          K1 = 17, K2 = 101, K3 = 200;
  localparam int FFT_LAT = N - 1 + (LOG_N - 1) * (ITER + 2) + 1;
  localparam int LAT = 3 * FFT_LAT + ((1 << (2 * LOG_N)) + 1) + 2 * (N + 1)
                     + (SIZE + RD_LAT + 2) + ((1 << (LOG_N + LOCK)) + 1);

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;

  initial #1 rst_n = 1'b0;     // a reset edge before the first clock

  logic    in_valid = 1'b0;
  sample_t in = '0;
  logic    out_valid;
  sample_t out;
  logic mem_valid, mem_burst_start, mem_we, mem_re, mem_rvalid;
  logic [AW-1:0] mem_addr;
  sample_t mem_wdata, mem_rdata;
  int bursts, burst_errors;

  int checks = 0, failures = 0;
  int cycle = 0, t_first_in = -1, t_first_out = -1, out_cnt = 0;
  int peak_hits = 0;
  comp_t got_re, got_im;
  assign got_re = out.re;
  assign got_im = out.im;

  fft3d_top dut (.*);
  ddr2_model #(.AW(AW), .LOCK(LOCK), .RD_LAT(RD_LAT)) u_mem (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  // progress report every 2^22 clocks
  always @(posedge clk)
    if (cycle % (1 << 22) == 0 && cycle > 0)
      $display("clock %0d, outputs checked %0d, failures %0d", cycle, out_cnt, failures);

  comp_t cos_tab [N];
  comp_t sin_tab [N];

  always @(posedge clk) begin
    if (out_valid && rst_n && out_cnt < SIZE) begin
      int k1, k2, k3;
      real er, gr, gi, tol;
      if (t_first_out < 0) t_first_out = cycle;
      k3 = out_cnt % N;
      k2 = (out_cnt / N) % N;
      k1 = out_cnt / (N * N);
      er = (k1 == K1 && k2 == K2 && k3 == K3) ? AMP : 0.0;
      tol = TOL + er / 1000.0;
      gr = real'(got_re);
      gi = real'(got_im);
      checks++;
      if ((gr - er > tol) || (er - gr > tol) || (gi > tol) || (-gi > tol)) begin
        failures++;
        if (failures < 10)
          $display("(k1,k2,k3)=(%0d,%0d,%0d): got (%0.0f,%0.0f) expected (%0.1f,0)",
                   k1, k2, k3, gr, gi, er);
      end
      if (er != 0.0 && gr > AMP - tol) peak_hits++;
      out_cnt++;
    end
  end

  initial begin
    for (int p = 0; p < N; p++) begin
      cos_tab[p] = comp_t'($rtoi($floor(AMP * $cos(2.0 * PI * p / N) + 0.5)));
      sin_tab[p] = comp_t'($rtoi($floor(AMP * $sin(2.0 * PI * p / N) + 0.5)));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2 * SIZE; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      if (t_first_in < 0) t_first_in = cycle;
      if (i < SIZE) begin
        int ph;
        ph = (K1 * (i % N) + K2 * ((i / N) % N) + K3 * (i / (N * N))) % N;
        in.re = cos_tab[ph];
        in.im = sin_tab[ph];
      end else begin
        in = '0;
      end
      if (i >= SIZE && out_cnt == SIZE) break;
    end
    // keep feeding zeros until the whole first data set is out
    while (out_cnt < SIZE) begin
      @(negedge clk);
      in_valid = 1'b1;
      in = '0;
    end
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (t_first_out - t_first_in != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", t_first_out - t_first_in, LAT);
    end
    checks++;
    if (peak_hits != 1) begin
      failures++;
      $display("tone peak found %0d times", peak_hits);
    end
    checks++;
    if (burst_errors != 0 || bursts == 0) begin
      failures++;
      $display("bursts %0d, misaligned %0d", bursts, burst_errors);
    end
    $display("latency %0d clocks, SDRAM bursts %0d", t_first_out - t_first_in, bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * SIZE) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
