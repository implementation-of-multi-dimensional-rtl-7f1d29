// tb_bitrev_perm: streams frames of tagged samples (frame number in the top byte,
// index in the rest) through bitrev_perm and checks that output position u of
// frame f carries index t of frame f-1, with t worked out field by field:
// t is u with its bits reversed.
// Checks the latency of 2^AW + 1 clocks and, from the third frame on,
// operation with random gaps in the input.
module tb_bitrev_perm;
  import fft3d_pkg::*;

  localparam int unsigned LOG_N = 8;
  localparam int unsigned AW     = LOG_N;
  localparam int unsigned SIZE   = 1 << AW;
  localparam int          FRAMES = 5;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;

  initial #1 rst_n = 1'b0;     // a reset edge before the first clock
  logic    in_valid = 1'b0;
  sample_t in = '0;
  logic    out_valid;
  sample_t out;

  int checks = 0, failures = 0;
  int cycle = 0, t_first_in = -1, t_first_out = -1, out_cnt = 0;

  bitrev_perm #(.LOG_N(LOG_N)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic logic [AW-1:0] src_index(input logic [AW-1:0] u);
    return {<<{u}};
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
        while (f >= 2 && $urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in = {8'(f), 24'(n)};
        if (t_first_in < 0) t_first_in = cycle;
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (t_first_out - t_first_in != SIZE + 1) begin
      failures++;
      $display("latency %0d, expected %0d", t_first_out - t_first_in, SIZE + 1);
    end
    checks++;
    if (out_cnt != (FRAMES - 1) * SIZE) begin
      failures++;
      $display("%0d outputs, expected %0d", out_cnt, (FRAMES - 1) * SIZE);
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
