// test_lfsr: pseudo-random number source for the on-chip random test mode.
//
// A 32-bit xorshift generator (x ^= x << 13; x ^= x >> 17; x ^= x << 5),
// advanced once per clock while 'en' is high. 'value' is the current state.
// SEED must be nonzero. The source design names a random number generation
// test mode; the generator type is this design's choice.
module test_lfsr #(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] value
);
  logic [31:0] nxt;
  always_comb begin
    nxt = value ^ (value << 13);
    nxt = nxt ^ (nxt >> 17);
    nxt = nxt ^ (nxt << 5);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  value <= SEED;
    else if (en) value <= nxt;
  end
endmodule
