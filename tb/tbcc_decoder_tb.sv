// tbcc_decoder_tb: end-to-end test of the decoder at its full size.
//
// For every frame the bench draws random information bits, encodes them
// into tail-biting codewords of the selected frame length (the parity part
// of H(D) is lower triangular with identity diagonal, so each parity column
// follows directly from the information and the earlier parity columns,
// modulo the frame length), checks that every parity check holds, adds
// noise and drives the 104 time instants into the decoder. In parallel it
// runs its own model of the decoding algorithm: the same layer steps in the
// same order, each variable keeping its slots with the channel value in the
// slot of the next visiting check, normalized min-sum with factor 0.75, and
// the early-termination test. The decoder's output must match the model bit
// for bit, its iteration count must match, and at low noise the decoded
// bits must equal the sent ones. Cycle counts of load, iteration and output
// are checked against 104, 108 per iteration (+1) and 104.
// Mechanisms counted (each must occur): each frame size mode, early
// termination, reaching iter_max, segment wrap-around, input stalls, output
// back-pressure, BIST mismatches detected, random test mode.
`timescale 1ns/1ps
module tbcc_decoder_tb;
  import tbcc_pkg::*;

  localparam int NT = NTIME;      // 104 time instants in memory

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fmode_e  fmode;
  tmode_e  tmode;
  logic [3:0] iter_max;
  logic    et_en;
  logic    in_valid, in_ready, out_valid, out_ready;
  llr_t [NCOL*Z-1:0] in_llr;
  logic [NINFO*Z-1:0] out_bits, ref_bits;
  logic [15:0] bist_errors;
  logic frame_done, early_stop;
  logic [3:0] frame_iters;

  tbcc_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_mode[3], n_et = 0, n_maxit = 0, n_wrap = 0, n_stall = 0, n_bp = 0, n_bist = 0, n_rand = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  bit          cw   [NT][NCOL][Z];      // sent code bits
  int          llr  [NT][NCOL][Z];      // channel values
  int          slot [NT][NCOL][DMAX][Z];
  bit          dec  [NT][NCOL][Z];
  int          m_iters;

  function automatic int nproc_of(fmode_e m);
    return (m == MODE_1P) ? 1 : (m == MODE_2P) ? 2 : 4;
  endfunction

  function automatic int sgn_mod(int a, int m);
    return ((a % m) + m) % m;
  endfunction

  function automatic int satq(int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  // Global time of the variable reached from a check in segment q, local tau.
  function automatic int var_time(int q, int tau, int a, fmode_e m);
    int np = nproc_of(m);
    int T  = SEG * np;
    int base = (q / np) * T;
    int c = (q % np) * SEG + tau;
    return base + sgn_mod(c - a, T);
  endfunction

  function automatic int slot_idx(int r, int j);
    int k = 0;
    for (int q = 0; q < r; q++) if (DELAY[q][j] >= 0) k++;
    return k;
  endfunction

  // Order in which the checks of a column visit the variable at local time x.
  function automatic int visit_key(int x, int r, int j);
    return ((x + DELAY[r][j]) % SEG) * NROW + r;
  endfunction

  function automatic int first_row(int x, int j);
    int best = -1, bk = 1 << 30;
    for (int r = 0; r < NROW; r++)
      if (DELAY[r][j] >= 0 && visit_key(x, r, j) < bk) begin bk = visit_key(x, r, j); best = r; end
    return best;
  endfunction

  function automatic int next_row(int x, int r0, int j);
    int best = -1, bk = 1 << 30, k0 = visit_key(x, r0, j);
    for (int r = 0; r < NROW; r++)
      if (DELAY[r][j] >= 0 && visit_key(x, r, j) > k0 && visit_key(x, r, j) < bk) begin
        bk = visit_key(x, r, j); best = r;
      end
    return (best < 0) ? first_row(x, j) : best;
  endfunction

  function automatic void encode(fmode_e m);
    int np = nproc_of(m);
    int T = SEG * np;
    for (int f = 0; f < NT / T; f++) begin
      int base = f * T;
      for (int t = 0; t < T; t++)
        for (int j = 0; j < NINFO; j++)
          for (int i = 0; i < Z; i++) cw[base+t][j][i] = 1'($urandom);
      for (int r = 0; r < NROW; r++)
        for (int t = 0; t < T; t++)
          for (int i = 0; i < Z; i++) begin
            bit p = 0;
            for (int j = 0; j < NINFO + r; j++)
              if (DELAY[r][j] >= 0)
                p ^= cw[base + sgn_mod(t - DELAY[r][j], T)][j][sgn_mod(i - SHIFT[r][j], Z)];
            cw[base+t][NINFO+r][sgn_mod(i - SHIFT[r][NINFO+r], Z)] = p;
          end
    end
  endfunction

  function automatic bit syndrome_ok(fmode_e m);
    int np = nproc_of(m);
    int T = SEG * np;
    for (int f = 0; f < NT / T; f++)
      for (int r = 0; r < NROW; r++)
        for (int t = 0; t < T; t++)
          for (int i = 0; i < Z; i++) begin
            bit p = 0;
            for (int j = 0; j < NCOL; j++)
              if (DELAY[r][j] >= 0)
                p ^= cw[f*T + sgn_mod(t - DELAY[r][j], T)][j][sgn_mod(i - SHIFT[r][j], Z)];
            if (p) return 0;
          end
    return 1;
  endfunction

  // Channel: amplitude amp (quarter units) plus uniform noise in [-nz, nz].
  function automatic void channel(int amp, int nz);
    for (int t = 0; t < NT; t++)
      for (int j = 0; j < NCOL; j++)
        for (int i = 0; i < Z; i++) begin
          int n = (nz == 0) ? 0 : int'($urandom % (2*nz + 1)) - nz;
          int v = (cw[t][j][i] ? -amp : amp) + n;
          llr[t][j][i] = (v > 31) ? 31 : (v < -32) ? -32 : v;
        end
  endfunction

  function automatic void model_load();
    for (int t = 0; t < NT; t++)
      for (int j = 0; j < NCOL; j++) begin
        int fr = first_row(t % SEG, j);
        for (int k = 0; k < DMAX; k++)
          for (int i = 0; i < Z; i++) slot[t][j][k][i] = 0;
        for (int i = 0; i < Z; i++) begin
          slot[t][j][slot_idx(fr, j)][i] = llr[t][j][i];
          dec[t][j][i] = (llr[t][j][i] < 0);
        end
      end
  endfunction

  function automatic void model_decode(fmode_e m, int imax, bit et);
    int nmax = (imax == 0) ? 1 : imax;
    m_iters = 0;
    for (int it = 0; it < nmax; it++) begin
      bit unsat = 0, chg = 0;
      for (int tau = 0; tau < SEG; tau++)
        for (int r = 0; r < NROW; r++)
          for (int q = 0; q < NPROC; q++) begin
            int vt [NCOL];
            int full [NCOL][Z];
            int v2c [NCOL][Z];
            int u [NCOL][Z];
            int c2v [NCOL][Z];
            bit d [NCOL][Z];
            for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
              int cur = slot_idx(r, j);
              vt[j] = var_time(q, tau, DELAY[r][j], m);
              for (int i = 0; i < Z; i++) begin
                int s = 0;
                for (int k = 0; k < DMAX; k++) s += slot[vt[j]][j][k][i];
                full[j][i] = s;
                v2c[j][i] = satq(s);
                u[j][i] = slot[vt[j]][j][cur][i];
              end
            end
            // checks
            for (int i = 0; i < Z; i++) begin
              int mag [NCOL];
              bit sg [NCOL];
              bit sprod = 0;
              int par = 0;
              for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
                int l = sgn_mod(i - SHIFT[r][j], Z);
                mag[j] = (v2c[j][l] < 0) ? -v2c[j][l] : v2c[j][l];
                sg[j]  = (v2c[j][l] < 0);
                sprod ^= sg[j];
              end
              for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
                int mn = 1000;
                int l = sgn_mod(i - SHIFT[r][j], Z);
                for (int k = 0; k < NCOL; k++)
                  if (k != j && DELAY[r][k] >= 0 && mag[k] < mn) mn = mag[k];
                mn = (mn >> 1) + (mn >> 2);
                c2v[j][l] = (sprod ^ sg[j]) ? -mn : mn;
              end
            end
            // updates
            for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
              int x = vt[j] % SEG;
              int cur = slot_idx(r, j);
              int nx = slot_idx(next_row(x, r, j), j);
              for (int i = 0; i < Z; i++) begin
                slot[vt[j]][j][cur][i] = c2v[j][i];
                slot[vt[j]][j][nx][i]  = u[j][i];
                d[j][i] = (full[j][i] + c2v[j][i]) < 0;
                if (d[j][i] != dec[vt[j]][j][i]) chg = 1;
                dec[vt[j]][j][i] = d[j][i];
              end
            end
            for (int i = 0; i < Z; i++) begin
              bit p = 0;
              for (int j = 0; j < NCOL; j++)
                if (DELAY[r][j] >= 0) p ^= d[j][sgn_mod(i - SHIFT[r][j], Z)];
              if (p) unsat = 1;
            end
          end
      m_iters = it + 1;
      if (et && !unsat && !chg) break;
    end
  endfunction

  // ---------------- driver ----------------
  int load_cycles, out_cycles, dec_cycles;
  bit stall_en, bp_en;

  task automatic run_frame(fmode_e m, tmode_e tm, int imax, bit et, int amp, int nz,
                           bit bad_ref, bit expect_clean);
    bit fire;
    int berr = 0;
    int t_in = 0, t_out = 0, errs = 0, mism = 0, cyc = 0, start_dec = 0, end_dec = 0;
    bit seen_iter_done = 0;
    fmode = m; iter_max = 4'(imax); et_en = et;
    encode(m);
    check(syndrome_ok(m), "encoder produced a codeword");
    channel(amp, nz);
    model_load();
    // load (the task is entered just after a falling edge)
    tmode = tm;
    while (t_in < NT) begin
      bit v = !(stall_en && ($urandom % 4 == 0));
      in_valid = v;
      for (int j = 0; j < NCOL; j++)
        for (int i = 0; i < Z; i++) in_llr[j*Z+i] = llr_t'(llr[t_in][j][i]);
      #1;
      fire = in_ready && (v || tm == TM_RANDOM);
      // In random mode the values come from the on-chip source: read them
      // back for the model.
      if (fire && tm == TM_RANDOM)
        for (int j = 0; j < NCOL; j++)
          for (int i = 0; i < Z; i++) llr[t_in][j][i] = int'(dut.src_llr[j*Z+i]);
      if (!v && tm != TM_RANDOM) n_stall++;
      @(posedge clk);
      cyc++;
      if (fire) t_in++;
      @(negedge clk);
    end
    in_valid = 0;
    if (tm == TM_RANDOM) begin
      for (int t = 0; t < NT; t++) for (int j = 0; j < NCOL; j++) for (int i = 0; i < Z; i++)
        cw[t][j][i] = 0;
      model_load();
      for (int i = 0; i < NINFO*Z; i++) check(dut.src_llr[i] >= -2, "random source range");
    end
    if (!stall_en && tm != TM_RANDOM) check(cyc == NT, $sformatf("load takes %0d clocks", cyc));
    model_decode(m, imax, et);
    // decode: wait for output
    cyc = 0;
    while (!out_valid) begin @(posedge clk); cyc++; @(negedge clk); end
    dec_cycles = cyc;
    check(cyc == 108 * m_iters + 1, $sformatf("decode %0d clocks for %0d iterations", cyc, m_iters));
    check(frame_iters == 4'(m_iters), $sformatf("iterations dut %0d model %0d", frame_iters, m_iters));
    if (m_iters < imax) n_et++; else n_maxit++;
    // output
    cyc = 0;
    while (t_out < NT) begin
      bit rdy = !(bp_en && ($urandom % 3 == 0));
      out_ready = rdy;
      for (int j = 0; j < NINFO; j++)
        for (int i = 0; i < Z; i++) ref_bits[j*Z+i] = cw[t_out][j][i] ^ (bad_ref && t_out == 5 && i == 0 && j == 0);
      #1;
      if (out_valid && rdy) begin
        for (int j = 0; j < NINFO; j++)
          for (int i = 0; i < Z; i++) begin
            if (out_bits[j*Z+i] != dec[t_out][j][i]) mism++;
            if (out_bits[j*Z+i] != cw[t_out][j][i]) errs++;
            if (out_bits[j*Z+i] != (tm == TM_RANDOM ? 1'b0 : ref_bits[j*Z+i])) berr++;
          end
      end
      @(posedge clk);
      cyc++;
      if (out_valid && rdy) t_out++;
      else if (!rdy) n_bp++;
      @(negedge clk);
    end
    out_ready = 0;
    if (!bp_en) check(cyc == NT, $sformatf("output takes %0d clocks", cyc));
    check(mism == 0, $sformatf("%0d output bits differ from model (mode %0d)", mism, m));
    if (expect_clean) check(errs == 0, $sformatf("%0d residual bit errors at low noise", errs));
    if (tm != TM_NORMAL) begin
      @(negedge clk);
      check(int'(bist_errors) == berr, $sformatf("bist count %0d expected %0d", bist_errors, berr));
      if (bist_errors != 0) n_bist++;
    end
    if (tm == TM_RANDOM) n_rand++;
    n_mode[m]++;
    $display("frame mode=%0d tmode=%0d iters=%0d errs=%0d mism=%0d", m, tm, m_iters, errs, mism);
  endtask

  // Wrap-around happens in every iteration; count the issued wrapped reads.
  always @(posedge clk) if (dut.s1_valid && |dut.s1_wrap) n_wrap++;

  initial begin
    in_valid = 0; out_ready = 0; ref_bits = '0; in_llr = '0;
    fmode = MODE_4P; tmode = TM_NORMAL; iter_max = 4; et_en = 0;
    stall_en = 0; bp_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Noise-free, full frame, 4 iterations without early termination.
    run_frame(MODE_4P, TM_NORMAL, 4, 0, 8, 0, 0, 1);
    // Low noise, early termination, each frame size.
    run_frame(MODE_4P, TM_NORMAL, 8, 1, 8, 10, 0, 1);
    run_frame(MODE_2P, TM_NORMAL, 8, 1, 8, 10, 0, 1);
    run_frame(MODE_1P, TM_NORMAL, 8, 1, 8, 10, 0, 1);
    // Heavy noise: model match only.
    stall_en = 1; bp_en = 1;
    run_frame(MODE_4P, TM_NORMAL, 6, 1, 5, 12, 0, 0);
    run_frame(MODE_2P, TM_BIST, 4, 1, 8, 6, 1, 0);
    stall_en = 0; bp_en = 0;
    run_frame(MODE_1P, TM_BIST, 3, 0, 5, 12, 0, 0);
    run_frame(MODE_4P, TM_RANDOM, 8, 1, 0, 0, 0, 0);
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all frame size modes used");
    check(n_et > 0, "early termination happened");
    check(n_maxit > 0, "iteration limit reached");
    check(n_wrap > 0, "segment wrap-around happened");
    check(n_stall > 0, "input stall happened");
    check(n_bp > 0, "output back-pressure happened");
    check(n_bist > 0, "BIST mismatch detected");
    check(n_rand > 0, "random test mode run");
    $display("mechanisms: modes=%0d/%0d/%0d et=%0d maxit=%0d wrap=%0d stall=%0d bp=%0d bist=%0d rand=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_et, n_maxit, n_wrap, n_stall, n_bp, n_bist, n_rand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
