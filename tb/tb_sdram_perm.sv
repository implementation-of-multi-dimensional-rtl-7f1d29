// tb_sdram_perm: streams data sets of tagged samples (data-set number in the
// top byte, index in the rest) through sdram_perm and a behavioural SDRAM,
// at LOG_N = 6 (2^18 samples per data set) to keep the run short. Checks that
// output position u of data set f carries index t of data set f-1, where
// t = {n3, k1, k2} is rebuilt from the fields of u: u = {k1, k2[hi],
// n3[lo], n3[hi], k2[lo]} with LOCK-bit "lo" parts. Also checks the latency
// (2^(3*LOG_N) + RD_LAT + 2 clocks), that every burst starts aligned, the
// burst count, and runs enough data sets to pass through all six address
// mappings of the permutation period.
module tb_sdram_perm;
  import fft3d_pkg::*;

  localparam int unsigned LOG_N  = 6;
  localparam int unsigned LOCK   = 4;
  localparam int unsigned RD_LAT = 6;
  localparam int unsigned AW     = 3 * LOG_N;
  localparam int unsigned SIZE   = 1 << AW;
  localparam int          FRAMES = 8;

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

  sdram_perm #(.LOG_N(LOG_N), .LOCK(LOCK)) dut (.*);
  ddr2_model #(.AW(AW), .LOCK(LOCK), .RD_LAT(RD_LAT)) u_mem (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic logic [AW-1:0] src_index(input logic [AW-1:0] u);
    logic [LOG_N-1:0] k1, k2, n3;
    k2 = {u[2*LOG_N-1:LOG_N+LOCK], u[LOCK-1:0]};
    n3 = {u[LOG_N-1:LOCK], u[LOG_N+LOCK-1:LOG_N]};
    k1 = u[3*LOG_N-1:2*LOG_N];
    return {n3, k1, k2};
  endfunction

  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      logic [31:0] expv;
      int f;
      f = out_cnt / SIZE;
      if (t_first_out < 0) t_first_out = cycle;
      expv = {8'(f), 24'(src_index(AW'(out_cnt % SIZE)))};
      checks++;
      if (out != expv) begin
        failures++;
        if (failures < 10) $display("out %0d: got %h expected %h", out_cnt, out, expv);
      end
      out_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < SIZE; n++) begin
        @(negedge clk);
        while (f >= 2 && $urandom_range(0, 7) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in = {8'(f), 24'(n)};
        if (t_first_in < 0) t_first_in = cycle;
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (RD_LAT + 10) @(posedge clk);
    checks++;
    if (t_first_out - t_first_in != SIZE + RD_LAT + 2) begin
      failures++;
      $display("latency %0d, expected %0d", t_first_out - t_first_in, SIZE + RD_LAT + 2);
    end
    checks++;
    if (out_cnt != (FRAMES - 1) * SIZE) begin
      failures++;
      $display("%0d outputs, expected %0d", out_cnt, (FRAMES - 1) * SIZE);
    end
    checks++;
    if (burst_errors != 0 || bursts != FRAMES * (SIZE >> LOCK)) begin
      failures++;
      $display("bursts %0d (misaligned %0d), expected %0d", bursts, burst_errors,
               FRAMES * (SIZE >> LOCK));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * FRAMES * SIZE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
