// tb_trng_stats: statistical check of the corrected output bit stream, the
// kind of evaluation used for TRNGs (NIST SP 800-22 style), on a stream
// short enough to simulate.
//
// The generator runs at default parameters with the first stored set
// (N = 405) and two behavioural DCMs with +/-10 ps jitter. Corrector lanes
// 0 and 1 (bits 0 and 1 of the peak count) are each collected as a stream of
// their own, NBITS bits each, and tested on their own. The lanes come from
// the same pair of numbers; with peaks spread over only a few counts they
// are correlated with one another, so concatenating them fails the runs
// test, and lane 2 yields a bit only when a pair straddles a multiple of 4,
// too rarely for a stream of this length in reasonable simulation time.
// Two tests are applied to each lane with the NIST acceptance level p >= 0.01:
//   frequency (monobit): |sum of +/-1| / sqrt(n) <= 2.5758,
//   runs: with pi the fraction of ones, |pi - 1/2| < 2/sqrt(n) and
//         |V - 2 n pi (1-pi)| / (2 sqrt(2n) pi (1-pi)) <= 1.8214,
//         V being the number of runs.
// The statistics measure the behavioural jitter model as much as the RTL;
// what they show is that the counter plus corrector turn that jitter into
// balanced, uncorrelated-looking bits.
module tb_trng_stats;
  timeunit 1ps;
  timeprecision 1ps;
  import trng_pkg::*;

  localparam int NBITS = 1000;  // per lane

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0;
  logic        sel_valid = 1'b0;
  logic [4:0]  sel = '0;
  logic        drp_req = 1'b0;
  logic        clk_a, clk_b, locked_a, locked_b;
  drp_rsp_t    rsp_a, rsp_b;
  drp_req_t    drp_a, drp_b;
  logic        dcm_rst_a, dcm_rst_b;
  logic [8:0]  rnd_number;
  logic        rnd_valid, rnd_sat;
  logic [2:0]  vnc_valid, vnc_bits;
  logic        sel_err, tune_busy, tune_done, tune_err;
  md_set_t     cur_set;
  int          checks = 0, failures = 0;

  bfd_trng_top dut (.*);

  dcm_adv_model #(.M_INIT(14), .D_INIT(15)) u_dcm_a (
    .CLKIN(clk), .RST(dcm_rst_a), .DCLK(clk), .DADDR(drp_a.daddr), .DI(drp_a.di),
    .DWE(drp_a.dwe), .DEN(drp_a.den), .DO(rsp_a.dout), .DRDY(rsp_a.drdy),
    .CLKFX(clk_a), .LOCKED(locked_a)
  );
  dcm_adv_model #(.M_INIT(27), .D_INIT(29)) u_dcm_b (
    .CLKIN(clk), .RST(dcm_rst_b), .DCLK(clk), .DADDR(drp_b.daddr), .DI(drp_b.di),
    .DWE(drp_b.dwe), .DEN(drp_b.den), .DO(rsp_b.dout), .DRDY(rsp_b.drdy),
    .CLKFX(clk_b), .LOCKED(locked_b)
  );

  always #5000 clk = !clk;

  bit bits [3][$];

  always @(posedge clk_b)
    for (int l = 0; l < 3; l++)
      if (vnc_valid[l] && bits[l].size() < NBITS) bits[l].push_back(vnc_bits[l]);

  task automatic test_stream(int lane);
    int   ones, runs;
    real  n, s_obs, pi, v_stat;
    n    = NBITS;
    ones = 0;
    runs = 1;
    foreach (bits[lane][i]) begin
      ones += bits[lane][i];
      if (i > 0 && bits[lane][i] != bits[lane][i-1]) runs++;
    end
    s_obs  = ((2.0 * ones - n) < 0 ? -(2.0 * ones - n) : (2.0 * ones - n)) / $sqrt(n);
    pi     = ones / n;
    v_stat = (runs - 2.0 * n * pi * (1.0 - pi));
    if (v_stat < 0) v_stat = -v_stat;
    v_stat = v_stat / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi));
    $display("lane %0d, %0d bits: ones=%0d s_obs=%f runs=%0d runs statistic=%f", lane, NBITS,
             ones, s_obs, runs, v_stat);
    checks++;
    if (s_obs > 2.5758) begin failures++; $display("FAIL: frequency test"); end
    checks++;
    if (((pi - 0.5) < 0 ? 0.5 - pi : pi - 0.5) >= 2.0 / $sqrt(n)) begin
      failures++; $display("FAIL: runs test prerequisite");
    end
    checks++;
    if (v_stat > 1.8214) begin failures++; $display("FAIL: runs test"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en    = 1'b1;
    wait (bits[0].size() >= NBITS && bits[1].size() >= NBITS);
    for (int l = 0; l < 2; l++) test_stream(l);
    $display("lane 2 produced %0d bits meanwhile", bits[2].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000000;  // 100 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
