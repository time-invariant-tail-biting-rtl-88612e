// shared_mem_tb: random lane-masked writes and reads against a shadow
// array: only enabled lanes change, reads return the word one clock later
// and a same-clock write to the read address is not seen (read-before-write).
module shared_mem_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en;
  logic [3:0] we;
  logic [4:0] ra, wa;
  logic [3:0][35:0] rd, wd, expd;
  logic [3:0][35:0] shadow [26];
  bit pend;
  int checks = 0, failures = 0;
  shared_mem #(.W(36), .LANES(4), .DEPTH(26), .AW(5)) dut (.clk, .rd_en, .rd_addr(ra),
    .rd_data(rd), .wr_en(we), .wr_addr(wa), .wr_data(wd));
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    rd_en = 0; we = 4'hF;
    for (int a = 0; a < 26; a++) begin
      @(negedge clk);
      wa = 5'(a);
      for (int l = 0; l < 4; l++) wd[l] = {4'(l), $urandom};
      shadow[a] = wd;
    end
    pend = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pend) begin checks++; if (rd != expd) failures++; end
      rd_en = 1'($urandom); we = 4'($urandom);
      ra = 5'($urandom % 26); wa = (n % 5 == 0) ? ra : 5'($urandom % 26);
      for (int l = 0; l < 4; l++) wd[l] = {4'($urandom), $urandom};
      pend = rd_en;
      if (rd_en) expd = shadow[ra];
      for (int l = 0; l < 4; l++) if (we[l]) shadow[wa][l] = wd[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
