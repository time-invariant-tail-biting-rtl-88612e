// shared_mem: a message bank shared by several processor segments.
//
// Columns of degree 1 and 2 have narrow words (36 or 72 bits). Since all
// processors use the same address at the same time, the words of LANES
// segments can sit side by side in one word of up to 144 bits, which saves
// memory macros. The bank has one read and one write port with a common
// address; each lane has its own write enable, so a load can fill one
// segment while the others keep their contents. Read is synchronous and
// returns the old word when a write hits the same address in the same clock.
// Sharing banks only for the narrow columns follows the source design; the
// per-lane write enable is this design's choice.
module shared_mem #(
  parameter int unsigned W     = 36,
  parameter int unsigned LANES = 4,
  parameter int unsigned DEPTH = 26,
  parameter int unsigned AW    = 5
) (
  input  logic                        clk,
  input  logic                        rd_en,
  input  logic [AW-1:0]               rd_addr,
  output logic [LANES-1:0][W-1:0]     rd_data,
  input  logic [LANES-1:0]            wr_en,
  input  logic [AW-1:0]               wr_addr,
  input  logic [LANES-1:0][W-1:0]     wr_data
);
  logic [LANES-1:0][W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    for (int l = 0; l < int'(LANES); l++)
      if (wr_en[l]) mem[wr_addr][l] <= wr_data[l];
  end
endmodule
