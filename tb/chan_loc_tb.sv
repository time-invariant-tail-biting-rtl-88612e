// chan_loc_tb: for every column, local time and row, the first and next
// slots are compared with a search over the visiting steps
// 4*((x + a) mod 26) + r of the column's checks.
module chan_loc_tb;
  import tbcc_pkg::*;
  logic [AW-1:0] x;
  logic [1:0] row;
  logic [NCOL-1:0][1:0] fs, ns;
  int checks = 0, failures = 0;
  for (genvar j = 0; j < NCOL; j++) begin : g
    chan_loc #(.COL(j)) dut (.x, .row, .first_slot(fs[j]), .next_slot(ns[j]));
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int xx = 0; xx < SEG; xx++)
      for (int r = 0; r < NROW; r++) begin
        x = AW'(xx); row = 2'(r);
        #1;
        for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
          automatic int mine, first_r = -1, next_r = -1, bestf = 999, bestn = 999;
          mine = ((xx + DELAY[r][j]) % SEG) * 4 + r;
          for (int q = 0; q < NROW; q++) if (DELAY[q][j] >= 0) begin
            automatic int st = ((xx + DELAY[q][j]) % SEG) * 4 + q;
            if (st < bestf) begin bestf = st; first_r = q; end
            if (st > mine && st < bestn) begin bestn = st; next_r = q; end
          end
          if (next_r < 0) next_r = first_r;
          checks += 2;
          if (int'(fs[j]) != slot_of(first_r, j)) failures++;
          if (int'(ns[j]) != slot_of(next_r, j)) begin
            failures++;
            $display("FAIL x=%0d r=%0d j=%0d next %0d exp %0d", xx, r, j, ns[j], slot_of(next_r, j));
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
