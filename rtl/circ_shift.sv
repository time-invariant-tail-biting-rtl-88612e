// circ_shift: inter-row permutation network for one lane group.
//
// A nonzero entry of H(D) is D^a times the cyclic permutation P^s of size 6.
// Check lane i of such an entry is connected to variable lane (i - s) mod 6.
// With INVERSE = 0 the unit maps variable order to check order,
// out[i] = in[(i - s) mod Z]; with INVERSE = 1 it maps back,
// out[i] = in[(i + s) mod Z]. It is a row of multiplexers; the shift amount
// changes from layer to layer, which is why the source design needs it
// between the rows. Purely combinational.
module circ_shift
  import tbcc_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  lanes_t      din,
  input  logic [2:0]  shift,   // 0..Z-1
  output lanes_t      dout
);
  always_comb begin
    for (int i = 0; i < Z; i++) begin
      int k;
      if (INVERSE) k = (i + int'(shift)) % Z;
      else         k = (i + Z - int'(shift)) % Z;
      dout[i] = din[k];
    end
  end
endmodule
