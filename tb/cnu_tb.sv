// cnu_tb: random vectors against a direct evaluation of normalized min-sum:
// every output is 0.75 x (minimum magnitude over the other unmasked inputs,
// truncated as (m>>1)+(m>>2)) with the sign product of the other inputs;
// masked outputs are zero.
module cnu_tb;
  import tbcc_pkg::*;
  llr_t [7:0] v2c, c2v;
  logic [7:0] mask;
  int checks = 0, failures = 0;
  cnu #(.N(8)) dut (.v2c, .mask, .c2v);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int deg = 5 + n % 4;
      mask = 8'((1 << deg) - 1);
      for (int k = 0; k < 8; k++) v2c[k] = llr_t'(int'($urandom % 63) - 31);
      if (n % 7 == 0) v2c[1] = v2c[0];   // equal minima
      #1;
      for (int k = 0; k < 8; k++) begin
        automatic int exp_v, mn = 99;
        automatic bit s = 0;
        automatic llr_t got = c2v[k];
        if (k < deg) begin
          for (int o = 0; o < deg; o++) if (o != k) begin
            automatic int a = (v2c[o] < 0) ? -int'(v2c[o]) : int'(v2c[o]);
            if (a < mn) mn = a;
            s ^= v2c[o][5];
          end
          mn = (mn >> 1) + (mn >> 2);
          exp_v = s ? -mn : mn;
        end else exp_v = 0;
        checks++;
        if (int'(got) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d got %0d exp %0d", n, k, got, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
