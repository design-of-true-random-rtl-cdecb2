// tb_bfd_trng_top: end-to-end test of the tunable BFD-TRNG at its default
// parameters, with two behavioural DCMs on a 100 MHz reference clock.
//
// 1. Both DCMs start with the first stored set (M_A=14 D_A=15, M_B=27
//    D_B=29, N=405). After reset and lock, random numbers are collected. The
//    peak counts from full beat intervals (those above half the expected
//    peak; the short ones come from jitter toggling the flip-flop around a
//    transition) must average within 5% of n = N/2, and their spread must
//    show randomness (more than one distinct value).
// 2. Set index 25 is requested: it must be refused (sel_err).
// 3. Set index 22 (M_A=21 D_A=19, M_B=32 D_B=29, N=608) is selected and a
//    reconfiguration requested: the DCMs must receive the new M/D, the
//    controller must report done and cur_set, and the full-interval peaks
//    must now average near 304.
// 4. en is dropped: the DCMs stop and no numbers appear; on raising en the
//    generator must resume.
// Throughout, the Von Neumann corrector's output is checked against a
// reference fed with the same raw numbers. Each mechanism (beat reset,
// corrector keep, corrector drop, refused index, reconfiguration, enable
// off/on) is counted and must have happened at least once.
module tb_bfd_trng_top;
  timeunit 1ps;
  timeprecision 1ps;
  import trng_pkg::*;

  logic        clk = 1'b0;     // 100 MHz reference and DRP clock
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

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // ---- raw numbers and Von Neumann reference (clock B domain) ----
  int   n_raw = 0, n_full = 0, sum_full = 0, min_full = 1000, max_full = 0;
  int   full_threshold = 101;
  int   vn_keep = 0, vn_drop = 0, vn_err = 0;
  bit   vn_have = 0;
  logic [2:0] vn_first;
  logic [2:0] vn_exp_valid = '0, vn_exp_bits = '0;
  int   raw_total = 0;

  always @(posedge clk_b) begin
    // outputs of the corrector for the number seen at the previous edge
    if (vnc_valid !== vn_exp_valid || ((vnc_valid & (vnc_bits ^ vn_exp_bits)) != 0)) vn_err++;
    vn_exp_valid = '0;
    if (rnd_valid && dut.rst_b_n) begin
      raw_total++;
      n_raw++;
      if (int'(rnd_number) > full_threshold) begin
        n_full++;
        sum_full += int'(rnd_number);
        if (int'(rnd_number) < min_full) min_full = int'(rnd_number);
        if (int'(rnd_number) > max_full) max_full = int'(rnd_number);
      end
      if (!vn_have) begin
        vn_first = rnd_number[2:0];
        vn_have  = 1;
      end else begin
        vn_have = 0;
        for (int l = 0; l < 3; l++) begin
          if (vn_first[l] != rnd_number[l]) begin
            vn_exp_valid[l] = 1'b1; vn_exp_bits[l] = vn_first[l]; vn_keep++;
          end else vn_drop++;
        end
      end
    end
    if (!dut.rst_b_n) begin vn_have = 0; end
  end

  task automatic collect(int count, int exp_n2x);
    // exp_n2x: expected peak times two (= N)
    n_raw = 0; n_full = 0; sum_full = 0; min_full = 1000; max_full = 0;
    full_threshold = exp_n2x / 4;
    wait (n_full >= count);
    $display("N=%0d: %0d numbers, %0d full intervals, mean %0d.%0d, range %0d..%0d",
             exp_n2x, n_raw, n_full, sum_full / n_full, (10 * sum_full / n_full) % 10,
             min_full, max_full);
    check(20 * sum_full >= 19 * n_full * exp_n2x / 2 &&
          20 * sum_full <= 21 * n_full * exp_n2x / 2,
          $sformatf("mean peak %0d not within 5%% of %0d", sum_full / n_full, exp_n2x / 2));
    check(max_full > min_full, "peak values show no variation");
  endtask

  int m_refused = 0, m_retune = 0, m_enable = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en    = 1'b1;
    wait (locked_a && locked_b);
    collect(200, 405);

    // refused index
    @(negedge clk) begin sel = 5'd25; sel_valid = 1'b1; end
    @(negedge clk) sel_valid = 1'b0;
    check(sel_err === 1'b1, "index 25 refused");
    if (sel_err) m_refused++;

    // reconfiguration to set 22
    @(negedge clk) begin sel = 5'd22; sel_valid = 1'b1; end
    @(negedge clk) begin sel_valid = 1'b0; drp_req = 1'b1; end
    @(negedge clk) drp_req = 1'b0;
    fork
      begin : wait_done
        @(posedge clk iff tune_done);
        m_retune++;
      end
      begin
        repeat (5000) @(posedge clk);
      end
    join_any
    disable fork;
    check(m_retune == 1 && !tune_err, "reconfiguration completed");
    check(cur_set == '{m_a: 21, d_a: 19, m_b: 32, d_b: 29}, "cur_set after retune");
    check(u_dcm_a.m_val == 21 && u_dcm_a.d_val == 19 && u_dcm_b.m_val == 32 &&
          u_dcm_b.d_val == 29, "DCM M/D after retune");
    check(u_dcm_a.bad_accesses == 0 && u_dcm_b.bad_accesses == 0, "DRP rules kept");
    wait (locked_a && locked_b);
    collect(200, 608);

    // enable off and on
    @(negedge clk) en = 1'b0;
    repeat (20) @(negedge clk);
    n_raw = 0;
    repeat (2000) @(negedge clk);
    check(n_raw == 0 && !locked_a && !locked_b, "generator stopped with en low");
    @(negedge clk) en = 1'b1;
    wait (locked_a && locked_b);
    m_enable++;
    collect(20, 608);

    check(vn_err == 0, $sformatf("%0d corrector output mismatches", vn_err));
    $display("mechanisms: numbers=%0d vnc_keep=%0d vnc_drop=%0d refused=%0d retune=%0d enable=%0d",
             raw_total, vn_keep, vn_drop, m_refused, m_retune, m_enable);
    check(raw_total > 0 && vn_keep > 0 && vn_drop > 0 && m_refused > 0 && m_retune > 0 &&
          m_enable > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000000;  // 50 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
