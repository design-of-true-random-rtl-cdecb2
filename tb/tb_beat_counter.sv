// tb_beat_counter: self-checking test of the BFD counter.
// The beat phase q is driven directly as alternating low and high runs of
// random length (low runs 1..600 cycles, so some exceed the 9-bit range,
// high runs 1..40 cycles). The expected peak is the length of the preceding
// low run, saturated at 511; it must appear on count_max with a one-cycle
// count_valid exactly one cycle after the first high cycle is sampled.
// The running count is also compared with the low-run position every cycle.
module tb_beat_counter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNT_W = 9;
  localparam int unsigned TOP   = (1 << CNT_W) - 1;

  logic             clk_b = 1'b0;
  logic             rst_n = 1'b0;
  logic             q     = 1'b0;
  logic [CNT_W-1:0] count, count_max;
  logic             count_valid, count_sat;
  int               checks = 0, failures = 0;
  int               peaks = 0, sats = 0;

  beat_counter #(.CNT_W(CNT_W)) dut (.clk_b, .rst_n, .q, .count, .count_max,
                                     .count_valid, .count_sat);

  always #5 clk_b = !clk_b;

  // reference: low-run length seen at each edge, and the expected strobe
  int   run = 0;
  logic q_prev = 1'b0;
  logic exp_valid = 1'b0;
  int   exp_max = 0;
  always @(posedge clk_b) begin
    if (rst_n) begin
      exp_valid <= 1'b0;
      if (q && !q_prev) begin
        exp_valid <= 1'b1;
        exp_max   <= (run > TOP) ? TOP : run;
      end
      run    <= q ? 0 : run + 1;
      q_prev <= q;
    end
  end

  task automatic check_cycle();
    checks++;
    if (count_valid !== exp_valid) begin
      failures++;
      $display("FAIL at %0t: count_valid=%b expected %b", $time, count_valid, exp_valid);
    end
    if (exp_valid) begin
      checks++;
      peaks++;
      if (exp_max == TOP) sats++;
      if (int'(count_max) != exp_max || count_sat !== (exp_max == TOP)) begin
        failures++;
        $display("FAIL at %0t: count_max=%0d sat=%b expected %0d", $time, count_max,
                 count_sat, exp_max);
      end
    end
    checks++;
    if (int'(count) != ((run > TOP) ? TOP : run)) begin
      failures++;
      $display("FAIL at %0t: count=%0d expected %0d", $time, count, run);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk_b);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      int lo, hi;
      lo = (i % 10 == 3) ? 520 + $urandom_range(80) : 1 + $urandom_range(450);
      hi = 1 + $urandom_range(39);
      q = 1'b0;
      repeat (lo) begin @(negedge clk_b); check_cycle(); end
      q = 1'b1;
      repeat (hi) begin @(negedge clk_b); check_cycle(); end
    end
    q = 1'b0;
    repeat (3) begin @(negedge clk_b); check_cycle(); end
    checks++;
    if (peaks != 60 || sats < 6) begin
      failures++;
      $display("FAIL: %0d peaks, %0d saturated", peaks, sats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
