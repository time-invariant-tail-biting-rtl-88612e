// bist_cmp_tb: random output/reference words; the error count must equal the
// number of differing bits over the fired words, be cleared by 'clear' and
// saturate at 65535.
module bist_cmp_tb;
  logic clk = 0, rst_n = 0, clear = 0, fire = 0;
  always #5 clk = ~clk;
  logic [23:0] d, r;
  logic [15:0] errors;
  logic any;
  int checks = 0, failures = 0, cnt = 0;
  bist_cmp #(.W(24)) dut (.clk, .rst_n, .clear, .fire, .dut_bits(d), .ref_bits(r),
    .errors, .any_error(any));
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 9000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(errors) != cnt || any != (cnt != 0)) failures++;
      clear = (n == 999);
      fire  = 1'($urandom);
      d = 24'($urandom); r = (n % 3 == 0) ? d ^ 24'(1 << (n % 24)) : 24'($urandom);
      if (n > 3000) r = ~d;
      if (clear) cnt = 0;
      else if (fire) begin
        cnt += $countones(d ^ r);
        if (cnt > 65535) cnt = 65535;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
