// tb_tuning_sweep: applies every stored tuning set in turn, at default
// parameters, and checks that the generator follows it.
//
// The expected sets come from the testbench's own search (N from 400 to
// 1000, N = D_A * M_B, N + 1 = D_B * M_A, sorted by (M_A, D_A, M_B), first
// 23). For each index the set is selected and a reconfiguration requested;
// then the behavioural DCMs must hold the new M and D, cur_set must show
// the set, and the long peak counts (above N/4) must average within 5% of
// N/2, the beat-interval half-length T_B / (2 (T_B - T_A)).
module tb_tuning_sweep;
  timeunit 1ps;
  timeprecision 1ps;
  import trng_pkg::*;

  localparam int PEAKS = 30;  // long peaks averaged per set

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

  dcm_adv_model #(.M_INIT(2), .D_INIT(1)) u_dcm_a (
    .CLKIN(clk), .RST(dcm_rst_a), .DCLK(clk), .DADDR(drp_a.daddr), .DI(drp_a.di),
    .DWE(drp_a.dwe), .DEN(drp_a.den), .DO(rsp_a.dout), .DRDY(rsp_a.drdy),
    .CLKFX(clk_a), .LOCKED(locked_a)
  );
  dcm_adv_model #(.M_INIT(2), .D_INIT(1)) u_dcm_b (
    .CLKIN(clk), .RST(dcm_rst_b), .DCLK(clk), .DADDR(drp_b.daddr), .DI(drp_b.di),
    .DWE(drp_b.dwe), .DEN(drp_b.den), .DO(rsp_b.dout), .DRDY(rsp_b.drdy),
    .CLKFX(clk_b), .LOCKED(locked_b)
  );

  always #5000 clk = !clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  typedef struct { int ma, da, mb, db, n; } set_t;
  set_t sets [$];

  function automatic int key(set_t s);
    return s.ma * 10000 + s.da * 100 + s.mb;
  endfunction

  int threshold = 1000, n_long = 0, sum_long = 0;
  always @(posedge clk_b)
    if (rnd_valid && dut.rst_b_n && int'(rnd_number) > threshold) begin
      n_long++;
      sum_long += int'(rnd_number);
    end

  int applied = 0;

  initial begin
    set_t s;
    for (int n = 400; n <= 1000; n++)
      for (int da = 1; da <= 32; da++)
        if (n % da == 0 && n / da >= 2 && n / da <= 33)
          for (int ma = 2; ma <= 33; ma++)
            if ((n + 1) % ma == 0 && (n + 1) / ma >= 1 && (n + 1) / ma <= 32) begin
              s = '{ma: ma, da: da, mb: n / da, db: (n + 1) / ma, n: n};
              sets.push_back(s);
            end
    sets.sort(x) with (key(x));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en    = 1'b1;
    wait (locked_a && locked_b);
    for (int i = 0; i < 23; i++) begin
      bit got;
      @(negedge clk) begin sel = 5'(i); sel_valid = 1'b1; end
      @(negedge clk) begin sel_valid = 1'b0; drp_req = 1'b1; end
      @(negedge clk) drp_req = 1'b0;
      got = 0;
      for (int c = 0; c < 5000 && !got; c++) begin
        @(negedge clk);
        if (tune_done) got = 1;
      end
      check(got, $sformatf("set %0d: reconfiguration done", i));
      check(cur_set == '{m_a: 6'(sets[i].ma), d_a: 6'(sets[i].da), m_b: 6'(sets[i].mb),
                         d_b: 6'(sets[i].db)}, $sformatf("set %0d: cur_set", i));
      check(u_dcm_a.m_val == sets[i].ma && u_dcm_a.d_val == sets[i].da &&
            u_dcm_b.m_val == sets[i].mb && u_dcm_b.d_val == sets[i].db,
            $sformatf("set %0d: DCM settings", i));
      threshold = sets[i].n / 4;
      n_long = 0;
      sum_long = 0;
      wait (n_long >= PEAKS);
      $display("set %2d: M_A=%0d D_A=%0d M_B=%0d D_B=%0d N=%0d mean peak %0d (expected %0d)",
               i, sets[i].ma, sets[i].da, sets[i].mb, sets[i].db, sets[i].n,
               sum_long / n_long, (sets[i].n + 1) / 2);
      check(20 * sum_long >= 19 * n_long * sets[i].n / 2 &&
            20 * sum_long <= 21 * n_long * sets[i].n / 2,
            $sformatf("set %0d: mean peak", i));
      applied++;
    end
    check(applied == 23 && u_dcm_a.bad_accesses == 0 && u_dcm_b.bad_accesses == 0,
          "all 23 sets applied within the DRP rules");
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
