// tb_md_rom: self-checking test of the tuning-set memory.
// The testbench builds its own list of permitted sets by a separate search:
// for each N from 400 to 1000 it looks for factorizations N = D_A * M_B and
// N + 1 = D_B * M_A within the DCM ranges, then sorts them by (M_A, D_A, M_B)
// and keeps the first 23. Every memory word, read with the one-cycle block
// RAM latency, must decode to that set; two words are also checked against
// hand-computed constants, and an address past the table must read 0.
module tb_md_rom;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0;
  logic [4:0]  addr = '0;
  logic [15:0] data;
  int          checks = 0, failures = 0;

  md_rom dut (.clk, .addr, .data);

  always #5 clk = !clk;

  typedef struct { int ma, da, mb, db, n; } set_t;
  set_t sets [$];

  function automatic int key(set_t s);
    return s.ma * 10000 + s.da * 100 + s.mb;
  endfunction

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
    $display("search found %0d sets", sets.size());

    for (int i = 0; i < 23; i++) begin
      @(negedge clk) addr = 5'(i);
      @(negedge clk);
      checks++;
      if (data !== {1'b0, 5'(sets[i].ma - 2), 5'(sets[i].da - 1), 5'(sets[i].mb - 2)}) begin
        failures++;
        $display("FAIL: word %0d = %h, expected set M_A=%0d D_A=%0d M_B=%0d", i, data,
                 sets[i].ma, sets[i].da, sets[i].mb);
      end
      // the stored set must satisfy T_A/T_B = N/(N+1) exactly
      checks++;
      if (sets[i].da * sets[i].mb * (sets[i].n + 1) != sets[i].db * sets[i].ma * sets[i].n)
        failures++;
      if (i == 0) begin
        checks++;
        if (data !== 16'h31D9) begin failures++; $display("FAIL: word 0 = %h", data); end
      end
      if (i == 22) begin
        checks++;
        if (data !== 16'h4E5E) begin failures++; $display("FAIL: word 22 = %h", data); end
      end
    end
    @(negedge clk) addr = 5'd30;
    @(negedge clk);
    checks++;
    if (data !== 16'h0) begin failures++; $display("FAIL: address 30 = %h", data); end
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
