// tb_addr_gen: self-checking test of the tuning-address register.
// Random indices 0..31 are requested at random times. An index below 23
// must appear on addr the next cycle with no error; an index of 23 or more
// must leave addr unchanged and give a one-cycle sel_err. Reset must give
// address 0.
module tb_addr_gen;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       sel_valid = 1'b0;
  logic [4:0] sel = '0;
  logic [4:0] addr;
  logic       sel_err;
  int         checks = 0, failures = 0;
  int         loads = 0, refusals = 0;

  addr_gen dut (.clk, .rst_n, .sel_valid, .sel, .addr, .sel_err);

  always #5 clk = !clk;

  int exp_addr = 0;
  bit exp_err = 0;

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (addr !== 5'd0) begin failures++; $display("FAIL: reset address %0d", addr); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      sel_valid = ($urandom_range(1) == 1);
      sel       = 5'($urandom);
      @(negedge clk);
      exp_err = 0;
      if (sel_valid) begin
        if (sel < 23) begin exp_addr = int'(sel); loads++; end
        else begin exp_err = 1; refusals++; end
      end
      checks++;
      if (int'(addr) != exp_addr || sel_err !== exp_err) begin
        failures++;
        $display("FAIL at %0t: addr=%0d err=%b expected %0d %b", $time, addr, sel_err,
                 exp_addr, exp_err);
      end
    end
    checks++;
    if (loads == 0 || refusals == 0) failures++;
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
