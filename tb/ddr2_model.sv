// ddr2_model: behavioural model of the external SDRAM behind its controller,
// as seen from the sdram_perm memory port. Not synthesizable logic of the
// design: it stands in for the DDR2 memory and its controller in
// simulation.
//
// Every valid access reads the addressed word and then, if mem_we is set,
// writes the new word there. Read data return in order RD_LAT clocks after
// the access, with mem_rvalid. Refresh, row changes and bursts are not
// modelled; the model only checks that every burst starts at an address
// whose locked low bits are zero, and counts bursts.
module ddr2_model
  import fft3d_pkg::*;
#(
  parameter int unsigned AW     = 24,
  parameter int unsigned LOCK   = 4,
  parameter int unsigned RD_LAT = 6
) (
  input  logic          clk,
  input  logic          mem_valid,
  input  logic          mem_burst_start,
  input  logic [AW-1:0] mem_addr,
  input  logic          mem_we,
  input  sample_t       mem_wdata,
  input  logic          mem_re,
  output logic          mem_rvalid,
  output sample_t       mem_rdata,
  output int            bursts,
  output int            burst_errors
);
  sample_t mem [2**AW];
  logic    v_pipe [RD_LAT];
  sample_t d_pipe [RD_LAT];

  initial begin
    bursts = 0;
    burst_errors = 0;
    for (int i = 0; i < RD_LAT; i++) begin
      v_pipe[i] = 1'b0;
      d_pipe[i] = '0;
    end
  end

  always @(posedge clk) begin
    for (int i = RD_LAT - 1; i > 0; i--) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    v_pipe[0] <= mem_valid && mem_re;
    d_pipe[0] <= mem[mem_addr];
    if (mem_valid && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_valid && mem_burst_start) begin
      bursts <= bursts + 1;
      if (mem_addr[LOCK-1:0] != '0) burst_errors <= burst_errors + 1;
    end
  end

  assign mem_rvalid = v_pipe[RD_LAT-1];
  assign mem_rdata  = d_pipe[RD_LAT-1];
endmodule
