// md_rom: the on-chip block RAM that holds the permitted DCM settings.
//
// DEPTH words of WORD_W bits (23 x 16 bits = 46 bytes, as in the document),
// addressed by a 5-bit address, read synchronously: data is valid on the
// clock edge after addr is presented, as in an FPGA block RAM. The content is
// fixed at configuration time and there is no write port, so the permitted
// (M, D) sets cannot be altered at run time. Word layout and how the sets are
// derived from the range rule are described in trng_pkg. Addresses at or past
// DEPTH read as zero.
//
// Interface: clk, addr, data.
module md_rom
  import trng_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_SETS
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [WORD_W-1:0] data
);

  localparam logic [NUM_SETS*WORD_W-1:0] TABLE = md_table();

  logic [WORD_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++)
      mem[i] = (i < int'(NUM_SETS)) ? TABLE[i*WORD_W +: WORD_W] : '0;
  end

  always_ff @(posedge clk) begin
    if (32'(addr) < DEPTH) data <= mem[addr];
    else data <= '0;
  end

endmodule
