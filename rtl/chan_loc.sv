// chan_loc: channel value location logic for one variable column.
//
// The channel value of a variable must sit in the slot of the check that
// visits the variable next. Which check that is depends on the schedule: all
// processors sweep their 26 local time instants in lockstep, and at each
// instant the four layers in order, so the check of row r that uses the
// variable at local time x is visited at step 4*((x + a(r,j)) mod 26) + r.
// Sorting those step numbers gives the visiting order, which depends on x:
// near the end of a segment some checks wrap to the start of the sweep.
// The unit returns, for variable local time x, the slot visited first in an
// iteration (where loading puts the channel value) and the slot visited
// after the one of row 'row' (where the channel value moves after that
// check). Purely combinational; it is a few comparators per column.
module chan_loc
  import tbcc_pkg::*;
#(
  parameter int unsigned COL = 0
) (
  input  logic [AW-1:0] x,
  input  logic [1:0]    row,
  output logic [1:0]    first_slot,
  output logic [1:0]    next_slot
);
  // Visiting key per row: 4*((x+a) mod 26) + r, below 104 so 7 bits do.
  logic [6:0]      key [NROW];
  logic [NROW-1:0] hit;

  for (genvar r = 0; r < int'(NROW); r++) begin : g_key
    localparam int A = delay_of(r, COL);
    logic [5:0] v;
    // x + a < 2*SEG, so one conditional subtraction is the modulo.
    assign v        = (6'(x) + 6'(A) >= 6'(SEG)) ? 6'(x) + 6'(A) - 6'(SEG)
                                                 : 6'(x) + 6'(A);
    assign key[r]   = 7'(v) * 7'(NROW) + 7'(r);
    assign hit[r]   = has_edge(r, COL);
  end

  always_comb begin
    logic [6:0] kcur, bf_key, bn_key;
    logic [1:0] best_first, best_next;
    logic       found_next;
    kcur       = key[row];
    best_first = '0;
    best_next  = '0;
    found_next = 1'b0;
    bf_key     = '1;
    bn_key     = '1;
    for (int r = 0; r < int'(NROW); r++) begin
      if (hit[r]) begin
        if (key[r] < bf_key) begin
          bf_key     = key[r];
          best_first = 2'(r);
        end
        if (key[r] > kcur && key[r] <= bn_key) begin
          bn_key     = key[r];
          best_next  = 2'(r);
          found_next = 1'b1;
        end
      end
    end
    // No later check in this iteration: the next visit is the first one of
    // the following iteration.
    if (!found_next) best_next = best_first;
    first_slot = 2'(slot_of(int'(best_first), COL));
    next_slot  = 2'(slot_of(int'(best_next), COL));
  end
endmodule
