// rst_sync: reset synchronizer. The output reset is asserted at once when
// arst_n falls and released two clock edges after arst_n rises, so logic in
// the clk domain leaves reset synchronously. Interface: clk, arst_n
// (asynchronous, active low), rst_n (synchronized, active low).
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic meta;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) {rst_n, meta} <= 2'b00;
    else {rst_n, meta} <= {meta, 1'b1};
  end

endmodule
