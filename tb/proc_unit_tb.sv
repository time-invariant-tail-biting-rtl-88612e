// proc_unit_tb: back-to-back layer steps with random slot words, rows and
// addresses. For each step the bench computes the expected write-back
// independently: variable-to-check = saturated slot sum, check lane i uses
// variable lane (i - s) mod 6, normalized min-sum (0.75, truncated), new
// message into the row's slot, channel value (the old content of that slot)
// into the slot of the next visiting check, decision = sign of (slot sum +
// new message), parity and change flags. The results must appear exactly
// three clocks after the step is issued.
module proc_unit_tb;
  import tbcc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s1_valid;
  logic [1:0] s1_row;
  logic [NCOL-1:0][AW-1:0] s1_addr;
  vword_t [NCOL-1:0] rd_word;
  logic [NCOL-1:0][Z-1:0] rd_dec;
  logic wr_valid, unsat, changed;
  logic [NCOL-1:0] wr_we;
  vword_t [NCOL-1:0] wr_word;
  logic [NCOL-1:0][Z-1:0] wr_dec;
  int checks = 0, failures = 0;

  proc_unit dut (.*);

  typedef struct {
    logic [NCOL-1:0] we;
    vword_t [NCOL-1:0] word;
    logic [NCOL-1:0][Z-1:0] dec;
    bit unsat, changed;
  } exp_t;
  exp_t q [$];

  function automatic int m6(int a); return ((a % 6) + 6) % 6; endfunction

  function automatic int nslot(int x, int r, int j);
    int k0 = ((x + DELAY[r][j]) % SEG) * 4 + r, best = -1, bk = 9999, fr = -1, fk = 9999;
    for (int q = 0; q < NROW; q++) if (DELAY[q][j] >= 0) begin
      int k = ((x + DELAY[q][j]) % SEG) * 4 + q;
      if (k < fk) begin fk = k; fr = q; end
      if (k > k0 && k < bk) begin bk = k; best = q; end
    end
    if (best < 0) best = fr;
    return slot_of(best, j);
  endfunction

  function automatic exp_t ref_step(int r, logic [NCOL-1:0][AW-1:0] ad,
                                    vword_t [NCOL-1:0] w, logic [NCOL-1:0][Z-1:0] od);
    exp_t e;
    int full [NCOL][Z];
    int v [NCOL][Z];
    int c [NCOL][Z];
    bit par [Z];
    e.unsat = 0; e.changed = 0;
    e.word = w; e.dec = '0; e.we = '0;
    for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
      e.we[j] = 1;
      for (int i = 0; i < Z; i++) begin
        int s = 0;
        for (int k = 0; k < col_deg(j); k++) begin llr_t t = w[j][k][i]; s += int'(t); end
        full[j][i] = s;
        v[j][i] = s > 31 ? 31 : s < -31 ? -31 : s;
      end
    end
    for (int i = 0; i < Z; i++) begin
      for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
        int mn = 99; bit sg = 0;
        for (int o = 0; o < NCOL; o++) if (o != j && DELAY[r][o] >= 0) begin
          int x = v[o][m6(i - SHIFT[r][o])];
          sg ^= (x < 0);
          if ((x < 0 ? -x : x) < mn) mn = (x < 0 ? -x : x);
        end
        mn = (mn >> 1) + (mn >> 2);
        c[j][m6(i - SHIFT[r][j])] = sg ? -mn : mn;
      end
    end
    for (int i = 0; i < Z; i++) par[i] = 0;
    for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
      int cur = slot_of(r, j);
      int nx = nslot(int'(ad[j]), r, j);
      for (int i = 0; i < Z; i++) begin
        e.word[j][cur][i] = llr_t'(c[j][i]);
        e.word[j][nx][i]  = w[j][cur][i];
        e.dec[j][i] = (full[j][i] + c[j][i]) < 0;
        if (e.dec[j][i] != od[j][i]) e.changed = 1;
      end
      for (int i = 0; i < Z; i++) par[i] ^= e.dec[j][m6(i - SHIFT[r][j])];
    end
    for (int i = 0; i < Z; i++) if (par[i]) e.unsat = 1;
    return e;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: issue at negedge; data of the step follows one clock later.
  int issued = 0, latency_ok = 0;
  int issue_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int r_d; logic [NCOL-1:0][AW-1:0] a_d; bit v_d;
    s1_valid = 0; s1_row = 0; s1_addr = '0; rd_word = '0; rd_dec = '0;
    v_d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      // data for the step issued last clock
      if (v_d) begin
        for (int j = 0; j < NCOL; j++) begin
          for (int k = 0; k < DMAX; k++) for (int i = 0; i < Z; i++)
            rd_word[j][k][i] = (k < col_deg(j)) ? llr_t'(int'($urandom % 41) - 20) : '0;
          rd_dec[j] = Z'($urandom);
        end
        if (n % 11 == 0) rd_dec = '0;
        q.push_back(ref_step(r_d, a_d, rd_word, rd_dec));
      end
      s1_valid = (n < 1490) && ($urandom % 5 != 0);
      s1_row = 2'($urandom);
      for (int j = 0; j < NCOL; j++) s1_addr[j] = AW'($urandom % SEG);
      if (s1_valid) issue_cyc.push_back(cyc);
      v_d = s1_valid; r_d = s1_row; a_d = s1_addr;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && wr_valid) begin
    exp_t e;
    int ic;
    checks++;
    if (q.size() == 0) failures++;
    else begin
      e = q.pop_front();
      ic = issue_cyc.pop_front();
      if (cyc - ic != 3) begin failures++; $display("FAIL latency %0d", cyc - ic); end
      if (wr_we != e.we) failures++;
      for (int j = 0; j < NCOL; j++) if (e.we[j]) begin
        checks++;
        if (wr_word[j] != e.word[j] || wr_dec[j] != e.dec[j]) begin
          failures++;
          if (failures < 5) $display("FAIL col %0d", j);
        end
      end
      checks++;
      if (unsat != e.unsat || changed != e.changed) failures++;
    end
  end
endmodule
