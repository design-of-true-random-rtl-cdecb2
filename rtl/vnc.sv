// vnc: Von Neumann corrector, the post-processing unit of the TRNG.
//
// Each raw random number contributes its LANES least significant bits. Lane i
// pairs bit i of one number with bit i of the next number: a pair 00 or 11 is
// dropped, a pair 01 or 10 yields its first bit. The document applies the
// corrector to the three LSBs of every random number with exactly this
// keep/drop rule; running the three bit positions as independent lanes, each
// pairing consecutive numbers, is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), in_valid / in_bits (one
// raw number's low bits per strobe). out_valid[i] is a one-cycle strobe, one
// cycle after the second number of a pair, when lane i produced a bit; that
// bit is out_bits[i]. The throughput is at most LANES bits per two numbers;
// for unbiased, independent input bits it averages LANES/4 bits per number.
module vnc #(
  parameter int unsigned LANES = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [LANES-1:0] in_bits,
  output logic [LANES-1:0] out_valid,
  output logic [LANES-1:0] out_bits
);

  logic             have_first;  // first number of a pair is held
  logic [LANES-1:0] first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first <= 1'b0;
      first      <= '0;
      out_valid  <= '0;
      out_bits   <= '0;
    end else begin
      out_valid <= '0;
      if (in_valid) begin
        if (!have_first) begin
          first      <= in_bits;
          have_first <= 1'b1;
        end else begin
          have_first <= 1'b0;
          out_valid  <= first ^ in_bits;  // 01 or 10: keep
          out_bits   <= first;            // the first bit of the pair
        end
      end
    end
  end

endmodule
