// tb_bfd_sampler: self-checking test of the beat-detector flip-flop.
// Clock B is a 10 ns clock; the data input (clock A in the design) is driven
// with random levels that change at random times away from the clock edges.
// A reference queue holds the value d_a had at each rising edge of clock B;
// q must equal the value from STAGES edges earlier. Also checks that reset
// clears q.
module tb_bfd_sampler;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STAGES = 1;

  logic clk_b = 1'b0;
  logic rst_n = 1'b0;
  logic d_a   = 1'b0;
  logic q;
  int   checks = 0, failures = 0;
  logic hist [$];

  bfd_sampler #(.STAGES(STAGES)) dut (.clk_b, .rst_n, .d_a, .q);

  always #5 clk_b = !clk_b;

  // data changes at random moments, never within 0.5 ns of a rising edge
  initial forever begin
    #(0.6 + ($urandom_range(80) / 10.0));
    if (($time % 10) > 0.4 && ($time % 10) < 9.5) d_a = 1'($urandom);
  end

  always @(posedge clk_b) if (rst_n) hist.push_back(d_a);

  initial begin
    #23;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL: q not cleared by reset"); end
    @(negedge clk_b) rst_n = 1'b1;
    repeat (2000) begin
      @(negedge clk_b);
      if (hist.size() >= STAGES) begin
        checks++;
        if (q !== hist[hist.size() - STAGES]) begin
          failures++;
          $display("FAIL at %0t: q=%b expected %b", $time, q, hist[hist.size() - STAGES]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
