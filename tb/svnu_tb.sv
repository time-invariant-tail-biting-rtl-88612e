// svnu_tb: checks the slot sum, its saturation to +-31 and the selection of
// the channel value of the current slot, for degrees 4 and 2 (the second
// instance must ignore slots 2 and 3).
module svnu_tb;
  import tbcc_pkg::*;
  vword_t slots;
  logic [1:0] cur, cur2;
  logic signed [Z-1:0][VW-1:0] f4, f2;
  lanes_t v4, c4, v2, c2;
  int checks = 0, failures = 0;
  svnu #(.DEG(4)) d4 (.slots, .cur, .v2c_full(f4), .v2c(v4), .chan(c4));
  svnu #(.DEG(2)) d2 (.slots, .cur(cur2), .v2c_full(f2), .v2c(v2), .chan(c2));
  task automatic chk(bit ok); checks++; if (!ok) failures++; endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < DMAX; k++) for (int i = 0; i < Z; i++)
        slots[k][i] = llr_t'(int'($urandom % 63) - 31);
      cur = 2'($urandom); cur2 = 2'($urandom % 2);
      #1;
      for (int i = 0; i < Z; i++) begin
        automatic int s4 = 0, s2 = 0, e4, e2;
        automatic logic signed [VW-1:0] gf4 = f4[i], gf2 = f2[i];
        automatic llr_t gv4 = v4[i], gv2 = v2[i];
        for (int k = 0; k < 4; k++) begin automatic llr_t e = slots[k][i]; s4 += int'(e); end
        for (int k = 0; k < 2; k++) begin automatic llr_t e = slots[k][i]; s2 += int'(e); end
        e4 = s4 > 31 ? 31 : s4 < -31 ? -31 : s4;
        e2 = s2 > 31 ? 31 : s2 < -31 ? -31 : s2;
        chk(int'(gf4) == s4); chk(int'(gv4) == e4); chk(c4[i] == slots[cur][i]);
        chk(int'(gf2) == s2); chk(int'(gv2) == e2); chk(c2[i] == slots[cur2][i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
