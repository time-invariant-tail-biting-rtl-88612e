// test_lfsr_tb: the generator must follow the xorshift32 recurrence from its
// seed, advance only while enabled, and not return to its seed within 5000 steps.
module test_lfsr_tb;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [31:0] value, x;
  int checks = 0, failures = 0;
  test_lfsr #(.SEED(32'hACE1_0001)) dut (.clk, .rst_n, .en, .value);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    x = 32'hACE1_0001;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (value != x) begin failures++; $display("FAIL n=%0d %h %h", n, value, x); end
      if (x != 32'hACE1_0001) begin checks++; if (value == 32'hACE1_0001) failures++; end
      en = 1'($urandom);
      if (en) begin x ^= x << 13; x ^= x >> 17; x ^= x << 5; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
