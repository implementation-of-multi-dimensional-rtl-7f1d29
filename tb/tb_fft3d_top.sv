// tb_fft3d_top: end-to-end test of the 3D FFT pipeline at LOG_N = 4
// (16 x 16 x 16 data sets), LOCK = 2, with the behavioural SDRAM.
//
// Eight data sets are streamed in: random data, one single tone, random data
// again, and from the third set on random gaps in the input. Every output of
// the first SETS_CHECKED sets is compared with a floating-point 3D DFT
// (three separable passes) scaled by 1/N^3, in the output order k3 fastest,
// then k2, then k1. Also checked: the latency of the first output sample,
// that every SDRAM burst is aligned, and that these mechanisms all happened:
// input gaps, SDRAM bursts, the SDRAM permutation cycling through its
// full period of address mappings, and the tone peak at its bin.
module tb_fft3d_top;
  import fft3d_pkg::*;

  localparam int unsigned LOG_N  = 4;
  localparam int unsigned LOCK   = 2;
  localparam int unsigned ITER   = 14;
  localparam int unsigned RD_LAT = 6;
  localparam int unsigned N      = 1 << LOG_N;
  localparam int unsigned AW     = 3 * LOG_N;
  localparam int unsigned SIZE   = 1 << AW;
  localparam int          SETS   = 8;
  localparam int          SETS_CHECKED = 6;
  localparam int          PERIOD = 6;     // SDRAM mapping period at these sizes
  localparam real         TOL    = 8.0;   // LSBs, plus 0.1 % of the value
  localparam real         PI     = 3.14159265358979323846;
  localparam int          TONE_K1 = 3, TONE_K2 = 5, TONE_K3 = 9;
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
  comp_t got_re, got_im;
  assign got_re = out.re;
  assign got_im = out.im;
  int cycle = 0, t_first_in = -1, t_first_out = -1, out_cnt = 0;
  int gaps = 0, peak_hits = 0, sdram_sets = 0, sdram_words = 0;

  fft3d_top #(.LOG_N(LOG_N), .LOCK(LOCK), .ITER(ITER)) dut (.*);
  ddr2_model #(.AW(AW), .LOCK(LOCK), .RD_LAT(RD_LAT)) u_mem (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  real xr [SETS][SIZE];
  real xi [SETS][SIZE];
  real yr [SIZE];
  real yi [SIZE];

  // in-place DFT along one dimension (stride N^dim) of yr/yi, scaled by 1/N
  task automatic dft_dim(input int dim);
    int stride = 1 << (LOG_N * dim);
    real tr [N];
    real ti [N];
    for (int base = 0; base < SIZE; base++) begin
      if (((base / stride) % N) != 0) continue;
      for (int k = 0; k < N; k++) begin
        tr[k] = 0.0; ti[k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real a, vr, vi;
          a  = -2.0 * PI * real'((n * k) % N) / real'(N);
          vr = yr[base + n * stride];
          vi = yi[base + n * stride];
          tr[k] += vr * $cos(a) - vi * $sin(a);
          ti[k] += vr * $sin(a) + vi * $cos(a);
        end
      end
      for (int k = 0; k < N; k++) begin
        yr[base + k * stride] = tr[k] / real'(N);
        yi[base + k * stride] = ti[k] / real'(N);
      end
    end
  endtask

  // expected results: ref[set][k1 + N*k2 + N*N*k3]
  real rr [SETS_CHECKED][SIZE];
  real ri [SETS_CHECKED][SIZE];

  always @(posedge clk) begin
    if (rst_n && dut.u_sdram.out_valid) begin
      sdram_words++;
      if (sdram_words % SIZE == 0) sdram_sets++;
    end
    if (out_valid && rst_n) begin
      int s, p, k1, k2, k3, idx;
      real er, ei, gr, gi, tol;
      s  = out_cnt / SIZE;
      p  = out_cnt % SIZE;
      if (t_first_out < 0) t_first_out = cycle;
      k3 = p % N;
      k2 = (p / N) % N;
      k1 = p / (N * N);
      idx = k1 + N * k2 + N * N * k3;
      if (s < SETS_CHECKED) begin
        er = rr[s][idx]; ei = ri[s][idx];
        gr = real'(got_re); gi = real'(got_im);
        tol = TOL + ((er < 0.0 ? -er : er) + (ei < 0.0 ? -ei : ei)) / 1000.0;
        checks++;
        if ((gr - er > tol) || (er - gr > tol) || (gi - ei > tol) || (ei - gi > tol)) begin
          failures++;
          if (failures < 10)
            $display("set %0d (k1,k2,k3)=(%0d,%0d,%0d): got (%0.0f,%0.0f) expected (%0.1f,%0.1f)",
                     s, k1, k2, k3, gr, gi, er, ei);
        end
        if (s == 1 && k1 == TONE_K1 && k2 == TONE_K2 && k3 == TONE_K3 && gr > 19000.0)
          peak_hits++;
      end
      out_cnt++;
    end
  end

  initial begin
    for (int s = 0; s < SETS; s++)
      for (int i = 0; i < SIZE; i++) begin
        if (s == 1) begin
          real ph;
          ph = 2.0 * PI * real'(((i % N) * TONE_K1 + ((i / N) % N) * TONE_K2
                                 + (i / (N * N)) * TONE_K3) % N) / real'(N);
          xr[s][i] = $floor(20000.0 * $cos(ph) + 0.5);
          xi[s][i] = $floor(20000.0 * $sin(ph) + 0.5);
        end else begin
          xr[s][i] = real'($signed($urandom_range(0, 40000)) - 20000);
          xi[s][i] = real'($signed($urandom_range(0, 40000)) - 20000);
        end
      end
    for (int s = 0; s < SETS_CHECKED; s++) begin
      for (int i = 0; i < SIZE; i++) begin
        yr[i] = xr[s][i]; yi[i] = xi[s][i];
      end
      dft_dim(0); dft_dim(1); dft_dim(2);
      for (int i = 0; i < SIZE; i++) begin
        rr[s][i] = yr[i]; ri[s][i] = yi[i];
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < SETS; s++)
      for (int i = 0; i < SIZE; i++) begin
        @(negedge clk);
        while (s >= 2 && $urandom_range(0, 9) == 0) begin
          in_valid = 1'b0;
          gaps++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in.re = comp_t'($rtoi(xr[s][i]));
        in.im = comp_t'($rtoi(xi[s][i]));
        if (t_first_in < 0) t_first_in = cycle;
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (100) @(posedge clk);
    checks++;
    if (t_first_out - t_first_in != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", t_first_out - t_first_in, LAT);
    end
    checks++;
    if (out_cnt < SETS_CHECKED * SIZE) begin
      failures++;
      $display("only %0d outputs", out_cnt);
    end
    checks++;
    if (burst_errors != 0) begin
      failures++;
      $display("%0d misaligned bursts", burst_errors);
    end
    $display("mechanisms: input gaps %0d, SDRAM bursts %0d, data sets through SDRAM %0d, tone peak %0d",
             gaps, bursts, sdram_sets, peak_hits);
    checks++;
    if (gaps == 0)    begin failures++; $display("no input gap happened"); end
    checks++;
    if (bursts == 0)  begin failures++; $display("no SDRAM burst happened"); end
    checks++;
    if (sdram_sets < PERIOD) begin
      failures++;
      $display("SDRAM permutation did not cycle through its %0d mappings", PERIOD);
    end
    checks++;
    if (peak_hits != 1) begin failures++; $display("tone peak not found"); end
    $display("latency %0d clocks", t_first_out - t_first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * SETS * SIZE + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
