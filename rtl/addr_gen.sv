// addr_gen: address generation for the tuning memory.
//
// Holds the 5-bit address of the (M, D) set that the next reconfiguration
// will use. A request sel_valid with an index sel below NUM_SETS loads that
// index; an index outside the stored sets is refused (sel_err pulses for one
// cycle and the address is kept), so only the permitted combinations can
// ever be addressed. The document names this block and its 5-bit output but
// not how the address is chosen; loading an index supplied by the user, with
// the range check, is this design's choice. After reset the address is 0.
//
// Interface: clk, rst_n (asynchronous, active low), sel_valid / sel (index
// request), addr (current address, updated the cycle after the request),
// sel_err (one-cycle strobe for a refused index).
module addr_gen
  import trng_pkg::*;
#(
  parameter int unsigned SETS = NUM_SETS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel_valid,
  input  logic [ADDR_W-1:0] sel,
  output logic [ADDR_W-1:0] addr,
  output logic              sel_err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr    <= '0;
      sel_err <= 1'b0;
    end else begin
      sel_err <= 1'b0;
      if (sel_valid) begin
        if (32'(sel) < SETS) addr <= sel;
        else sel_err <= 1'b1;
      end
    end
  end

endmodule
