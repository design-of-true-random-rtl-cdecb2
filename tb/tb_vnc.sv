// tb_vnc: self-checking test of the Von Neumann corrector.
// Random 3-bit inputs arrive with random gaps (including back-to-back). The
// reference pairs consecutive inputs: for each lane a 01 or 10 pair must give
// a one-cycle out_valid with the pair's first bit, a 00 or 11 pair nothing.
// Also counts that both the keep and the drop cases occurred in every lane.
module tb_vnc;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LANES = 3;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid = 1'b0;
  logic [LANES-1:0] in_bits = '0;
  logic [LANES-1:0] out_valid, out_bits;
  int               checks = 0, failures = 0;
  int               kept [LANES] = '{default: 0};
  int               dropped [LANES] = '{default: 0};

  vnc #(.LANES(LANES)) dut (.clk, .rst_n, .in_valid, .in_bits, .out_valid, .out_bits);

  always #5 clk = !clk;

  logic             have = 1'b0;
  logic [LANES-1:0] first = '0;
  logic [LANES-1:0] exp_valid = '0, exp_bits = '0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // drive an input; one rising edge later the DUT must have answered it
      in_valid = ($urandom_range(2) != 0);
      in_bits  = LANES'($urandom);
      @(negedge clk);
      // expectation for the input the DUT sampled at the last rising edge
      exp_valid = '0;
      if (in_valid) begin
        if (!have) begin
          first = in_bits;
          have  = 1'b1;
        end else begin
          have = 1'b0;
          for (int l = 0; l < LANES; l++) begin
            if (first[l] != in_bits[l]) begin
              exp_valid[l] = 1'b1;
              exp_bits[l]  = first[l];
              kept[l]++;
            end else begin
              dropped[l]++;
            end
          end
        end
      end
      // compare what the DUT produced for the input
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out_valid[l] !== exp_valid[l] || (exp_valid[l] && out_bits[l] !== exp_bits[l])) begin
          failures++;
          $display("FAIL at %0t lane %0d: valid=%b bit=%b expected %b %b", $time, l,
                   out_valid[l], out_bits[l], exp_valid[l], exp_bits[l]);
        end
      end
    end
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (kept[l] == 0 || dropped[l] == 0) begin
        failures++;
        $display("FAIL: lane %0d kept %0d dropped %0d", l, kept[l], dropped[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
