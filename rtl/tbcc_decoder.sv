// tbcc_decoder: memory-based decoder for the rate-1/2 time-invariant
// tail-biting LDPC convolutional code of tbcc_pkg.
//
// Four processors decode one memory of 104 time instants (4992 code bits)
// in parallel, each owning a segment of 26 time instants. Depending on
// 'fmode' the memory holds one frame of 104 instants, two of 52 or four of
// 26; the inter-processor permutation networks close each frame into a
// ring. The decoding schedule is layered (modified on-demand variable node
// activation) with normalized min-sum checks; each processor finishes one
// layer step of six checks per clock.
//
// Memory: per segment and variable column a message word of degree x 36
// bits (26 words, 97,344 bits in all) and one decision bank (26 x 6 bits).
// The degree-1 column shares one 144-bit bank among all four segments and
// the degree-2 column one 144-bit bank per pair of segments.
//
// Interface (all valid/ready):
//   in_*   one time instant per clock: 48 LLRs of 6 bits (4 integer, 2
//          fraction bits, positive = bit 0), element j*6+i = column j lane i.
//          104 instants fill the memory in time order; in the modes with
//          several frames, frame k occupies instants k*26*frame_procs onward.
//   out_*  one time instant per clock: the 24 decided information bits.
//   tmode  TM_NORMAL decodes the input pins; TM_BIST also compares the
//          output with ref_bits; TM_RANDOM ignores the input pins and
//          decodes an on-chip pseudo-random noisy all-zero frame, compared
//          with zero. bist_errors counts differing bits of the last frame.
// Timing: 104 load clocks, 108 clocks per iteration, 1 + 104 output clocks.
// Modes must be held stable during a frame.
module tbcc_decoder
  import tbcc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  fmode_e                     fmode,
  input  tmode_e                     tmode,
  input  logic [3:0]                 iter_max,
  input  logic                       et_en,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  llr_t [NCOL*Z-1:0]          in_llr,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [NINFO*Z-1:0]         out_bits,
  input  logic [NINFO*Z-1:0]         ref_bits,
  output logic [15:0]                bist_errors,
  output logic                       frame_done,
  output logic [3:0]                 frame_iters,
  output logic                       early_stop
);
  localparam int unsigned NRND = (NCOL*Z*4 + 31) / 32;

  // ---------------- input source ----------------
  logic                  c_in_valid;
  llr_t [NCOL*Z-1:0]     src_llr;
  logic [NRND*32-1:0]    rnd;
  logic                  load_we;
  logic [1:0]            load_seg;
  logic [AW-1:0]         load_addr;

  for (genvar g = 0; g < NRND; g++) begin : g_rnd
    test_lfsr #(.SEED(32'h9E37_79B9 ^ (32'(g) * 32'h0101_0101 + 32'h55))) u_lfsr (
      .clk(clk), .rst_n(rst_n), .en(load_we && tmode == TM_RANDOM),
      .value(rnd[g*32 +: 32])
    );
  end

  // Random mode: all-zero codeword, LLR = +1.75 plus noise in [-2.0, +1.75].
  always_comb begin
    c_in_valid = (tmode == TM_RANDOM) ? 1'b1 : in_valid;
    for (int k = 0; k < int'(NCOL*Z); k++) begin
      if (tmode == TM_RANDOM)
        src_llr[k] = llr_t'(7) + llr_t'($signed(rnd[k*4 +: 4]));
      else
        src_llr[k] = in_llr[k];
    end
  end

  // ---------------- controller ----------------
  logic                    s1_valid;
  logic [1:0]              s1_row;
  logic [NCOL-1:0][AW-1:0] s1_addr, s4_addr;
  logic [NCOL-1:0]         s1_wrap, s4_wrap;
  logic                    flag_valid, flag_unsat, flag_changed;
  logic                    out_phase;
  logic [AW-1:0]           out_rd_addr, out_addr;
  logic [1:0]              out_seg;
  logic                    decoding;

  dec_ctrl u_ctrl (
    .clk, .rst_n, .iter_max, .et_en,
    .in_valid(c_in_valid), .in_ready, .load_we, .load_seg, .load_addr,
    .s1_valid, .s1_row, .s1_addr, .s1_wrap, .s4_addr, .s4_wrap,
    .flag_valid, .flag_unsat, .flag_changed,
    .out_phase, .out_rd_addr, .out_valid, .out_ready, .out_seg, .out_addr,
    .decoding, .frame_done, .frame_iters, .early_stop
  );

  // ---------------- processors ----------------
  vword_t [NPROC-1:0][NCOL-1:0]            p_rword, p_wword;
  logic   [NPROC-1:0][NCOL-1:0][Z-1:0]     p_rdec, p_wdec;
  logic   [NPROC-1:0][NCOL-1:0]            p_we;
  logic   [NPROC-1:0]                      p_wvalid, p_unsat, p_changed;

  for (genvar q = 0; q < NPROC; q++) begin : g_proc
    proc_unit u_proc (
      .clk, .rst_n,
      .s1_valid, .s1_row, .s1_addr,
      .rd_word(p_rword[q]), .rd_dec(p_rdec[q]),
      .wr_valid(p_wvalid[q]), .wr_we(p_we[q]), .wr_word(p_wword[q]),
      .wr_dec(p_wdec[q]), .unsat(p_unsat[q]), .changed(p_changed[q])
    );
  end

  assign flag_valid   = p_wvalid[0];
  assign flag_unsat   = |p_unsat;
  assign flag_changed = |p_changed;

  // ---------------- memories and permutation networks ----------------
  logic [NPROC-1:0][NCOL-1:0][Z-1:0] seg_dec_rd;

  for (genvar j = 0; j < NCOL; j++) begin : g_col
    localparam int unsigned DEG = col_deg(j);
    localparam int unsigned MW  = DEG * GW;   // message word
    localparam int unsigned PW  = MW + Z;     // message word + decisions

    logic [1:0] first_slot, unused_next;
    chan_loc #(.COL(j)) u_loc (
      .x(load_addr), .row(2'd0), .first_slot(first_slot), .next_slot(unused_next)
    );

    // Initial word: channel value in the slot of the first check, zeros else.
    vword_t       init_w;
    logic [Z-1:0] init_d;
    always_comb begin
      init_w = '0;
      for (int i = 0; i < int'(Z); i++) begin
        init_w[first_slot][i] = src_llr[j*Z + i];
        init_d[i]             = src_llr[j*Z + i][QW-1];
      end
    end

    logic [NPROC-1:0][PW-1:0] seg_rd, proc_rd, proc_wd, seg_wd;
    logic [NPROC-1:0]         seg_we, proc_we;

    logic [NPROC-1:0][MW-1:0] m_rd, m_wd;
    logic [NPROC-1:0][AW-1:0] m_wa;
    logic [NPROC-1:0]         m_we;

    for (genvar s = 0; s < NPROC; s++) begin : g_seg
      logic [Z-1:0]  d_rd;
      logic [AW-1:0] d_ra;
      logic [Z-1:0]  d_wd;
      wire           ld = load_we && (load_seg == 2'(s));

      always_comb begin
        m_we[s] = ld | seg_we[s];
        m_wa[s] = ld ? load_addr : s4_addr[j];
        m_wd[s] = ld ? MW'(init_w) : seg_wd[s][MW-1:0];
        d_wd    = ld ? init_d      : seg_wd[s][PW-1:MW];
        d_ra    = out_phase ? out_rd_addr : s1_addr[j];
      end

      msg_mem #(.W(Z), .DEPTH(SEG), .AW(AW)) u_dec (
        .clk, .rd_en(s1_valid | out_phase), .rd_addr(d_ra), .rd_data(d_rd),
        .wr_en(m_we[s]), .wr_addr(m_wa[s]), .wr_data(d_wd)
      );
      assign seg_rd[s]        = {d_rd, m_rd[s]};
      assign seg_dec_rd[s][j] = d_rd;
    end

    // Message banks. Narrow columns (degree 1 and 2) put the words of
    // several segments side by side in one bank of at most 144 bits; all
    // segments use the same address in the same clock, and a load writes
    // one lane only.
    localparam int unsigned SPB = (MW * 2 <= WORDW) ? WORDW / MW : 1;  // segments per bank
    for (genvar b = 0; b < NPROC / SPB; b++) begin : g_bank
      if (SPB == 1) begin : g_own
        msg_mem #(.W(MW), .DEPTH(SEG), .AW(AW)) u_msg (
          .clk, .rd_en(s1_valid), .rd_addr(s1_addr[j]), .rd_data(m_rd[b]),
          .wr_en(m_we[b]), .wr_addr(m_wa[b]), .wr_data(m_wd[b])
        );
      end else begin : g_shared
        logic          lds;
        logic [AW-1:0] wa;
        always_comb begin
          lds = load_we && (int'(load_seg) / SPB == b);
          wa  = lds ? load_addr : s4_addr[j];
        end
        shared_mem #(.W(MW), .LANES(SPB), .DEPTH(SEG), .AW(AW)) u_msg (
          .clk, .rd_en(s1_valid), .rd_addr(s1_addr[j]), .rd_data(m_rd[b*SPB +: SPB]),
          .wr_en(m_we[b*SPB +: SPB]), .wr_addr(wa), .wr_data(m_wd[b*SPB +: SPB])
        );
      end
    end

    // The read data of a step arrives one clock after its address: delay
    // the wrap flag to match.
    logic rd_wrap_q;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) rd_wrap_q <= 1'b0;
      else        rd_wrap_q <= s1_wrap[j];

    ipn #(.W(PW)) u_ipn (
      .mode(fmode), .rd_wrap(rd_wrap_q), .seg_rdata(seg_rd), .proc_rdata(proc_rd),
      .wr_wrap(s4_wrap[j]), .proc_we(proc_we), .proc_wdata(proc_wd),
      .seg_we(seg_we), .seg_wdata(seg_wd)
    );

    for (genvar q = 0; q < NPROC; q++) begin : g_pq
      logic [WORDW-1:0] wflat;
      assign wflat = p_wword[q][j];
      always_comb begin
        p_rword[q][j] = vword_t'(proc_rd[q][MW-1:0]);
        p_rdec[q][j]  = proc_rd[q][PW-1:MW];
        proc_we[q]    = p_we[q][j];
        proc_wd[q]    = {p_wdec[q][j], wflat[MW-1:0]};
      end
    end
  end

  // ---------------- output and self-test ----------------
  always_comb
    for (int j = 0; j < int'(NINFO); j++) out_bits[j*Z +: Z] = seg_dec_rd[out_seg][j];

  logic [NINFO*Z-1:0] cmp_ref;
  logic               bist_any;
  assign cmp_ref = (tmode == TM_RANDOM) ? '0 : ref_bits;

  bist_cmp #(.W(NINFO*Z)) u_bist (
    .clk, .rst_n,
    .clear(load_we && load_seg == 2'd0 && load_addr == '0),
    .fire(out_valid && out_ready && tmode != TM_NORMAL),
    .dut_bits(out_bits), .ref_bits(cmp_ref),
    .errors(bist_errors), .any_error(bist_any)
  );

  // Status signals kept for observation in simulation only.
  logic unused_ok;
  assign unused_ok = ^{out_addr, decoding, bist_any, p_wvalid[NPROC-1:1]};
endmodule
