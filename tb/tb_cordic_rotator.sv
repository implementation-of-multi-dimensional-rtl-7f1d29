// tb_cordic_rotator: checks the CORDIC rotator against a floating-point
// complex rotation, for random samples and angles over the whole circle,
// and checks its latency of ITER + 2 clocks.
module tb_cordic_rotator;
  import fft3d_pkg::*;

  localparam int unsigned ITER = 14;
  localparam int unsigned LAT  = ITER + 2;
  localparam int          NVEC = 2000;
  localparam real         TOL  = 6.0;       // LSBs
  localparam real         PI   = 3.14159265358979323846;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;

  initial #1 rst_n = 1'b0;     // a reset edge before the first clock
  logic    in_valid = 1'b0;
  sample_t in = '0;
  angle_t  angle = '0;
  logic    out_valid;
  sample_t out;

  int checks = 0, failures = 0;
  comp_t got_re, got_im;
  assign got_re = out.re;
  assign got_im = out.im;

  cordic_rotator #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  // expected outputs, queued in input order
  real exp_re [$];
  real exp_im [$];
  int  t_in [$];
  int  cycle = 0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      real er, ei;
      int  t0;
      er = exp_re.pop_front();
      ei = exp_im.pop_front();
      t0 = t_in.pop_front();
      checks++;
      if ((real'(got_re) - er > TOL) || (er - real'(got_re) > TOL) ||
          (real'(got_im) - ei > TOL) || (ei - real'(got_im) > TOL)) begin
        failures++;
        if (failures < 10)
          $display("mismatch: got (%0.0f,%0.0f) expected (%0.1f,%0.1f)", real'(got_re), real'(got_im), er, ei);
      end
      checks++;
      if (cycle - t0 != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t0, LAT);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NVEC; n++) begin
      real a, xr, xi, mag;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      // keep |x| below full scale so the rotated value cannot saturate
      in.re = comp_t'($signed($urandom_range(0, 45000)) - 22500);
      in.im = comp_t'($signed($urandom_range(0, 45000)) - 22500);
      angle = angle_t'($urandom);
      if (in_valid) begin
        a  = 2.0 * PI * real'(angle) / 65536.0;
        xr = real'(in.re);
        xi = real'(in.im);
        exp_re.push_back(xr * $cos(a) - xi * $sin(a));
        exp_im.push_back(xr * $sin(a) + xi * $cos(a));
        t_in.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_re.size());
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
