// bfd_sampler: the beat detector flip-flop of the BFD-TRNG.
//
// Clock A (the slightly faster DCM output) is sampled on every rising edge of
// clock B. Because A gains one full period on B every N cycles of B, the
// sampled value q stays high for about N/2 cycles of B and low for about N/2,
// with jitter making the transition instants (and short bursts of toggling
// around them) random. This is the document's D flip-flop with A on D and B
// on the clock pin.
//
// STAGES is the number of flip-flops in series. The document notes that
// cascading flip-flops removes metastability; its resource table lists one
// register for this block, so one stage is the default and more stages only
// add latency (one clock-B cycle each).
//
// Interface: clk_b (sampling clock), rst_n (asynchronous, active low, clears
// q), d_a (clock A used as data), q (sampled beat phase).
module bfd_sampler #(
  parameter int unsigned STAGES = 1
) (
  input  logic clk_b,
  input  logic rst_n,
  input  logic d_a,
  output logic q
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk_b or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else sr <= STAGES'({sr, d_a});  // shift d_a in at the bottom
  end

  assign q = sr[STAGES-1];

endmodule
