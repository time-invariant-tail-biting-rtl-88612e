// proc_unit: one decoding processor, a 4-stage pipeline that performs one
// layer step per clock.
//
// A layer step is one base row r of H(D) at one local time instant tau: the
// six checks of that row's circulants, each joined to 5..8 variable groups
// (one per nonzero column j, at time tau - a(r,j)). Stages:
//   S1  the controller presents the variable addresses; the banks read
//       (outside this unit, synchronous read).
//   S2  sub-VNUs add the slots of each variable to its variable-to-check
//       message; the inter-row permutation turns each group into check order.
//   S3  six check node units (normalized min-sum) produce the new
//       check-to-variable messages, which are turned back into variable
//       order. The new word gets the message in the current slot and the
//       channel value moved into the slot of the variable's next check
//       (modified on-demand variable node activation). The hard decision is
//       the sign of (variable-to-check + new message); the parity of the
//       decisions of each check and a change against the stored decision
//       are flagged for early termination.
//   S4  the registered word, decisions and flags are written back.
// A step writes three clocks after its read. This is safe because the code
// keeps the delays of one column in different rows at least 2 apart (modulo
// 26): two checks of one variable are then at least 5 steps apart, so no
// step reads a word that an earlier step still has in flight.
// Inputs: s1_* in the read cycle, rd_word/rd_dec one clock later.
// Outputs: wr_* registered, valid three clocks after s1_valid.
module proc_unit
  import tbcc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          s1_valid,
  input  logic [1:0]                    s1_row,
  input  logic [NCOL-1:0][AW-1:0]       s1_addr,
  input  vword_t [NCOL-1:0]             rd_word,
  input  logic [NCOL-1:0][Z-1:0]        rd_dec,
  output logic                          wr_valid,
  output logic [NCOL-1:0]               wr_we,
  output vword_t [NCOL-1:0]             wr_word,
  output logic [NCOL-1:0][Z-1:0]        wr_dec,
  output logic                          unsat,
  output logic                          changed
);
  // ---------------- S2 ----------------
  logic                    v2;
  logic [1:0]              row2;
  logic [NCOL-1:0][AW-1:0] addr2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2    <= 1'b0;
      row2  <= '0;
      addr2 <= '0;
    end else begin
      v2    <= s1_valid;
      row2  <= s1_row;
      addr2 <= s1_addr;
    end
  end

  logic signed [NCOL-1:0][Z-1:0][VW-1:0] full2;
  lanes_t [NCOL-1:0]                     v2c2, chan2, chk2;

  for (genvar j = 0; j < NCOL; j++) begin : g_s2
    logic [1:0] cur;
    logic [2:0] sh;
    always_comb begin
      cur = 2'(slot_of(int'(row2), j));
      sh  = has_edge(int'(row2), j) ? 3'(SHIFT[row2][j]) : 3'd0;
    end
    svnu #(.DEG(col_deg(j))) u_svnu (
      .slots(rd_word[j]), .cur(cur),
      .v2c_full(full2[j]), .v2c(v2c2[j]), .chan(chan2[j])
    );
    circ_shift #(.INVERSE(1'b0)) u_rot (.din(v2c2[j]), .shift(sh), .dout(chk2[j]));
  end

  // ---------------- S3 ----------------
  logic                                  v3;
  logic [1:0]                            row3;
  logic [NCOL-1:0][AW-1:0]               addr3;
  vword_t [NCOL-1:0]                     word3;
  lanes_t [NCOL-1:0]                     chan3, chk3;
  logic signed [NCOL-1:0][Z-1:0][VW-1:0] full3;
  logic [NCOL-1:0][Z-1:0]                old3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3    <= 1'b0;
      row3  <= '0;
      addr3 <= '0;
      word3 <= '0;
      chan3 <= '0;
      chk3  <= '0;
      full3 <= '0;
      old3  <= '0;
    end else begin
      v3    <= v2;
      row3  <= row2;
      addr3 <= addr2;
      word3 <= rd_word;
      chan3 <= chan2;
      chk3  <= chk2;
      full3 <= full2;
      old3  <= rd_dec;
    end
  end

  logic [NCOL-1:0] emask3;
  always_comb
    for (int j = 0; j < int'(NCOL); j++) emask3[j] = has_edge(int'(row3), j);

  // Check node units, one per check lane.
  llr_t [Z-1:0][NCOL-1:0] cin, cout;
  always_comb
    for (int i = 0; i < int'(Z); i++)
      for (int j = 0; j < int'(NCOL); j++) cin[i][j] = chk3[j][i];

  for (genvar i = 0; i < Z; i++) begin : g_cnu
    cnu #(.N(NCOL)) u_cnu (.v2c(cin[i]), .mask(emask3), .c2v(cout[i]));
  end

  vword_t [NCOL-1:0]      nword3;
  logic [NCOL-1:0][Z-1:0] dec3, dchk3;
  logic                   unsat3, changed3;

  for (genvar j = 0; j < NCOL; j++) begin : g_s3
    lanes_t     c2v_chk, c2v_var;
    lanes_t     dtmp;
    lanes_t     dchk_l;
    logic [1:0] first_unused, nxt;
    logic [2:0] sh;
    always_comb begin
      for (int i = 0; i < int'(Z); i++) c2v_chk[i] = cout[i][j];
      sh = emask3[j] ? 3'(SHIFT[row3][j]) : 3'd0;
    end
    circ_shift #(.INVERSE(1'b1)) u_unrot (.din(c2v_chk), .shift(sh), .dout(c2v_var));
    chan_loc #(.COL(j)) u_loc (
      .x(addr3[j]), .row(row3), .first_slot(first_unused), .next_slot(nxt)
    );
    always_comb begin
      logic [1:0] cur;
      cur       = 2'(slot_of(int'(row3), j));
      nword3[j] = word3[j];
      nword3[j][cur] = c2v_var;
      nword3[j][nxt] = chan3[j];     // for degree 1, cur == nxt: channel stays
      for (int i = 0; i < int'(Z); i++) begin
        logic signed [VW-1:0] app;
        app        = full3[j][i] + VW'(c2v_var[i]);
        dec3[j][i] = app[VW-1];
        dtmp[i]    = llr_t'(dec3[j][i]);
      end
    end
    // Decisions in check order, for the parity of each check.
    circ_shift #(.INVERSE(1'b0)) u_drot (.din(dtmp), .shift(sh), .dout(dchk_l));
    always_comb
      for (int i = 0; i < int'(Z); i++) dchk3[j][i] = dchk_l[i][0];
  end

  always_comb begin
    logic [Z-1:0] par;
    par      = '0;
    changed3 = 1'b0;
    for (int j = 0; j < int'(NCOL); j++) begin
      if (emask3[j]) begin
        par ^= dchk3[j];
        if (dec3[j] != old3[j]) changed3 = 1'b1;
      end
    end
    unsat3 = |par;
  end

  // ---------------- S4 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_valid <= 1'b0;
      wr_we    <= '0;
      wr_word  <= '0;
      wr_dec   <= '0;
      unsat    <= 1'b0;
      changed  <= 1'b0;
    end else begin
      wr_valid <= v3;
      wr_we    <= v3 ? emask3 : '0;
      wr_word  <= nword3;
      wr_dec   <= dec3;
      unsat    <= v3 & unsat3;
      changed  <= v3 & changed3;
    end
  end
endmodule
