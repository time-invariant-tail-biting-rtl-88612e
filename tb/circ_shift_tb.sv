// circ_shift_tb: forward rotation must give out[i] = in[(i-s) mod 6], the
// inverse instance must undo it for every shift.
module circ_shift_tb;
  import tbcc_pkg::*;
  lanes_t a, b, c;
  logic [2:0] s;
  int checks = 0, failures = 0;
  circ_shift #(.INVERSE(1'b0)) f (.din(a), .shift(s), .dout(b));
  circ_shift #(.INVERSE(1'b1)) g (.din(b), .shift(s), .dout(c));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < Z; i++) a[i] = llr_t'($urandom);
      s = 3'(n % Z);
      #1;
      for (int i = 0; i < Z; i++) begin
        checks++;
        if (b[i] != a[(i + Z - int'(s)) % Z]) failures++;
      end
      checks++;
      if (c != a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
