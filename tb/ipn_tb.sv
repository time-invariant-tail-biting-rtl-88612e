// ipn_tb: for each frame size mode and wrap flag the read side must give
// processor q the word of its own segment or of the previous segment of
// its frame (1P: itself; 2P: the partner in {0,1},{2,3}; 4P: q-1 mod 4),
// and the write side must route each processor's word and enable back to
// that same segment.
module ipn_tb;
  import tbcc_pkg::*;
  fmode_e mode;
  logic rw, ww;
  logic [3:0][35:0] srd, prd, pwd, swd;
  logic [3:0] pwe, swe;
  int checks = 0, failures = 0;
  ipn #(.W(36)) dut (.mode, .rd_wrap(rw), .seg_rdata(srd), .proc_rdata(prd),
    .wr_wrap(ww), .proc_we(pwe), .proc_wdata(pwd), .seg_we(swe), .seg_wdata(swd));
  function automatic int prev(int q, int m);
    if (m == 0) return q;
    if (m == 1) return (q / 2) * 2 + (1 - q % 2);
    return (q + 3) % 4;
  endfunction
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 600; n++) begin
      automatic int m = n % 3;
      mode = fmode_e'(m);
      rw = 1'($urandom); ww = 1'($urandom);
      for (int q = 0; q < 4; q++) begin srd[q] = {4'(q), $urandom}; pwd[q] = {4'(q+8), $urandom}; end
      pwe = 4'($urandom);
      #1;
      for (int q = 0; q < 4; q++) begin
        automatic int rs = rw ? prev(q, m) : q;
        automatic int ws = ww ? prev(q, m) : q;
        checks++;
        if (prd[q] != srd[rs]) failures++;
        checks++;
        if (swe[ws] != pwe[q] || (pwe[q] && swd[ws] != pwd[q])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
