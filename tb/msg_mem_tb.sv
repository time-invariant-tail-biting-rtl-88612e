// msg_mem_tb: random writes and reads against a shadow array; the read data
// must appear one clock after the read and a same-address write in that
// clock must not affect it (read-before-write).
module msg_mem_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [4:0] ra, wa;
  logic [35:0] rd, wd, shadow [26], expd;
  bit   pend;
  int checks = 0, failures = 0;
  msg_mem #(.W(36), .DEPTH(26), .AW(5)) dut (.clk, .rd_en, .rd_addr(ra), .rd_data(rd),
    .wr_en, .wr_addr(wa), .wr_data(wd));
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    rd_en = 0; wr_en = 1;
    for (int a = 0; a < 26; a++) begin
      @(negedge clk); wa = 5'(a); wd = {4'(a), $urandom}; shadow[a] = wd;
    end
    pend = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd != expd) failures++;
      end
      rd_en = 1'($urandom); wr_en = 1'($urandom);
      ra = 5'($urandom % 26); wa = (n % 5 == 0) ? ra : 5'($urandom % 26);
      wd = {4'($urandom), $urandom};
      pend = rd_en;
      if (rd_en) expd = shadow[ra];
      if (wr_en) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
