// tb_drp_ctrl: self-checking test of the DCM reconfiguration controller.
// A small table in the testbench stands in for the tuning memory (one-cycle
// read latency) and holds two permitted sets and three words that break the
// range rule. Two DRP responders answer each access two cycles later and
// record it; the LOCKED inputs fall while dcm_rst is high and rise 5 cycles
// after it is released. For a permitted set, each DCM must receive exactly
// one write of {M-1, D-1} to register 0x50 while held in reset, with D_B
// worked out by hand, followed by a done strobe and cur_set holding the set.
// For a refused word, err must pulse and no DCM access may happen. A request
// made while busy must be ignored.
module tb_drp_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import trng_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        req = 1'b0;
  logic [4:0]  addr_in = '0;
  logic [4:0]  rom_addr;
  logic [15:0] rom_data;
  drp_req_t    drp_a, drp_b;
  drp_rsp_t    rsp_a, rsp_b;
  logic        dcm_rst, locked_a, locked_b, busy, done, err;
  md_set_t     cur_set;
  int          checks = 0, failures = 0;

  drp_ctrl dut (.clk, .rst_n, .req, .addr_in, .rom_addr, .rom_data, .drp_a, .rsp_a,
                .drp_b, .rsp_b, .dcm_rst, .locked_a, .locked_b, .busy, .done, .err,
                .cur_set);

  always #5 clk = !clk;

  // memory stand-in: {M_A-2, D_A-1, M_B-2}
  logic [15:0] table_w [5] = '{
    16'h31D9,  // M_A=14 D_A=15 M_B=27 -> N=405, D_B=29
    16'h4E5E,  // M_A=21 D_A=19 M_B=32 -> N=608, D_B=29
    16'h31DA,  // M_A=14 D_A=15 M_B=28 -> 421/14 not whole
    16'h0001,  // M_A=2  D_A=1  M_B=3  -> N=3 below 400
    16'h030F   // M_A=2  D_A=25 M_B=17 -> D_B=213 above 32
  };
  always_ff @(posedge clk) rom_data <= table_w[rom_addr % 5];

  // DRP responders and lock model
  int          acc_a = 0, acc_b = 0;
  logic [15:0] di_a, di_b;
  logic [6:0]  ad_a, ad_b;
  bit          rst_ok = 1;
  int          lock_cnt = 0;
  int          rdy_a = 0, rdy_b = 0;

  always_ff @(posedge clk) begin
    rsp_a.drdy <= (rdy_a == 1);
    rsp_b.drdy <= (rdy_b == 1);
    if (rdy_a > 0) rdy_a <= rdy_a - 1;
    if (rdy_b > 0) rdy_b <= rdy_b - 1;
    if (drp_a.den) begin
      acc_a <= acc_a + 1; di_a <= drp_a.di; ad_a <= drp_a.daddr; rdy_a <= 2;
      if (!dcm_rst || !drp_a.dwe) rst_ok <= 0;
    end
    if (drp_b.den) begin
      acc_b <= acc_b + 1; di_b <= drp_b.di; ad_b <= drp_b.daddr; rdy_b <= 2;
      if (!dcm_rst || !drp_b.dwe) rst_ok <= 0;
    end
    lock_cnt <= dcm_rst ? 0 : (lock_cnt < 5 ? lock_cnt + 1 : lock_cnt);
  end
  assign rsp_a.dout = '0;
  assign rsp_b.dout = '0;
  assign locked_a = (lock_cnt >= 5);
  assign locked_b = (lock_cnt >= 5);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // run one request; returns through the counters
  task automatic run(int idx, bit expect_ok, logic [15:0] exp_a, logic [15:0] exp_b,
                     md_set_t exp_set);
    int a0, b0, cyc;
    bit saw_done, saw_err;
    a0 = acc_a; b0 = acc_b; saw_done = 0; saw_err = 0; cyc = 0;
    @(negedge clk) begin addr_in = 5'(idx); req = 1'b1; end
    @(negedge clk) req = 1'b0;
    // a second request while busy must be ignored
    @(negedge clk) begin addr_in = 5'd2; req = busy; end
    @(negedge clk) req = 1'b0;
    while ((busy || cyc < 2) && cyc < 200) begin
      @(negedge clk);
      cyc++;
      if (done) saw_done = 1;
      if (err)  saw_err = 1;
    end
    repeat (3) @(negedge clk);
    check(!busy, "controller did not return to idle");
    check(saw_done == expect_ok && saw_err == !expect_ok, "done/err strobe");
    if (expect_ok) begin
      check(acc_a == a0 + 1 && acc_b == b0 + 1, "one DRP write per DCM");
      check(ad_a == 7'h50 && ad_b == 7'h50, "DRP register address 0x50");
      check(di_a == exp_a, $sformatf("DCM-A word %h expected %h", di_a, exp_a));
      check(di_b == exp_b, $sformatf("DCM-B word %h expected %h", di_b, exp_b));
      check(cur_set == exp_set, "cur_set");
      check(!dcm_rst, "DCMs released from reset");
    end else begin
      check(acc_a == a0 && acc_b == b0, "no DRP access for a refused set");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (8) @(negedge clk);
    run(0, 1, 16'h0D0E, 16'h1A1C, '{m_a: 14, d_a: 15, m_b: 27, d_b: 29});
    run(1, 1, 16'h1412, 16'h1F1C, '{m_a: 21, d_a: 19, m_b: 32, d_b: 29});
    run(2, 0, '0, '0, '0);
    run(3, 0, '0, '0, '0);
    run(4, 0, '0, '0, '0);
    check(cur_set == '{m_a: 21, d_a: 19, m_b: 32, d_b: 29}, "refusals keep cur_set");
    check(rst_ok == 1, "all DRP accesses were writes made in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
