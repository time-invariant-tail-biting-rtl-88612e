// svnu: sub-variable-node unit for one lane group (6 variables of a column).
//
// Under the modified on-demand variable node activation schedule a variable
// of degree d keeps exactly d slots: d-1 check-to-variable messages and its
// channel value, which always sits in the slot of the check that will visit
// the variable next. The variable-to-check message for that check is then
// simply the sum of all d slots. The unit adds the slots lane by lane, gives
// the exact sum (for the hard decision) and the sum saturated to the 6-bit
// message range (for the check node), and picks out the channel value held
// in the current slot. DEG is the column degree; slots DEG..DMAX-1 are
// ignored. Purely combinational; the processor registers its outputs.
module svnu
  import tbcc_pkg::*;
#(
  parameter int unsigned DEG = 4
) (
  input  vword_t                        slots,
  input  logic [1:0]                    cur,      // slot of the active check
  output logic signed [Z-1:0][VW-1:0]   v2c_full,
  output lanes_t                        v2c,
  output lanes_t                        chan
);
  always_comb begin
    for (int i = 0; i < Z; i++) begin
      logic signed [VW-1:0] acc;
      acc = '0;
      for (int k = 0; k < int'(DEG); k++) acc += VW'(slots[k][i]);
      v2c_full[i] = acc;
      v2c[i]      = sat(acc);
      chan[i]     = slots[cur][i];
    end
  end
endmodule
