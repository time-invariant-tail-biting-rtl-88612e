// bist_cmp: built-in automatic output comparison.
//
// In the comparison test modes the expected decoded bits are presented next
// to the decoder output; on every accepted output word (fire) the unit counts
// the bits that differ, saturating at 2^16-1. 'clear' restarts the count
// (the decoder pulses it when a new frame begins). 'errors' and 'any_error'
// can be read after the frame. Comparing on chip avoids relying on the
// output pads at full speed; counting bits rather than words is this
// design's choice.
module bist_cmp #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         fire,
  input  logic [W-1:0] dut_bits,
  input  logic [W-1:0] ref_bits,
  output logic [15:0]  errors,
  output logic         any_error
);
  logic [15:0] nerr;
  always_comb begin
    nerr = '0;
    for (int i = 0; i < int'(W); i++) nerr += 16'(dut_bits[i] ^ ref_bits[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      errors <= '0;
    end else if (clear) begin
      errors <= '0;
    end else if (fire) begin
      errors <= (17'(errors) + 17'(nerr) > 17'hFFFF) ? 16'hFFFF : errors + nerr;
    end
  end
  assign any_error = (errors != 0);
endmodule
