// beat_counter: the BFD counter that turns beat intervals into random numbers.
//
// Runs on clock B. While the sampler output q is low the counter increments
// once per cycle; while q is high it is held at zero. On the cycle where q is
// seen to rise, the value the counter had reached (its peak for that beat
// interval) is delivered on count_max with a one-cycle count_valid strobe.
// With a period ratio T_A/T_B = N/(N+1) the peak is close to n = N/2, and
// clock jitter makes its exact value (and so its low bits) random. This
// follows the document's counter, which is reset by a logic-1 output of the
// flip-flop and whose peak value is the random number (COUNT_MAX).
//
// Own choices: the peak is captured on the rising edge of q (the moment the
// counter is reset) rather than by a separate sampling clock; the counter
// saturates at its maximum instead of wrapping, and a saturated peak is
// flagged with count_sat. CNT_W = 9 covers the document's peak range of 200
// to 500.
//
// Interface: clk_b, rst_n (asynchronous, active low), q (beat phase from
// bfd_sampler), count (running value), count_max / count_valid (peak and its
// strobe, one cycle after q rises), count_sat (peak was the saturated value).
module beat_counter #(
  parameter int unsigned CNT_W = 9
) (
  input  logic             clk_b,
  input  logic             rst_n,
  input  logic             q,
  output logic [CNT_W-1:0] count,
  output logic [CNT_W-1:0] count_max,
  output logic             count_valid,
  output logic             count_sat
);

  localparam logic [CNT_W-1:0] CNT_TOP = '1;

  logic q_d;  // q one cycle ago, for rising-edge detection

  always_ff @(posedge clk_b or negedge rst_n) begin
    if (!rst_n) begin
      count       <= '0;
      count_max   <= '0;
      count_valid <= 1'b0;
      count_sat   <= 1'b0;
      q_d         <= 1'b0;
    end else begin
      q_d         <= q;
      count_valid <= 1'b0;
      if (q) begin
        count <= '0;
        if (!q_d) begin
          // start of the reset phase: the value reached is the peak
          count_max   <= count;
          count_valid <= 1'b1;
          count_sat   <= (count == CNT_TOP);
        end
      end else if (count != CNT_TOP) begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
