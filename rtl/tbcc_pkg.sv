// tbcc_pkg: code definition and shared constants of the tail-biting
// LDPC convolutional code (TB-LDPC-CC) decoder.
//
// The code is time-invariant and rate 1/2. Its polynomial parity-check matrix
// H(D) has a 4 x 8 base (4 check rows = 4 decoding layers, 8 variable
// columns; columns 0..3 are information, 4..7 parity). Every nonzero entry is
// a monomial D^a times a 6 x 6 cyclic permutation P^s, so one time instant
// carries 8 x 6 = 48 code bits. The parity part is lower triangular with an
// identity diagonal, which makes the tail-biting version exist for any frame
// length. A check in row r at time t adds the 6-bit lane group of column j at
// time t - a(r,j) (modulo the frame length), rotated by s(r,j):
// check lane i takes variable lane (i - s) mod 6.
//
// The delays, shifts, lifting size 6, memory size 21, 6-bit (4.2) LLRs,
// scaling factor 0.75 and 4 processors follow the source design. The segment
// length of 26 time instants per processor follows from its frame sizes
// (1248, 2496, 4992 code bits = 1, 2, 4 processors). Lane direction of P and
// the fixed-point rounding are this design's choices.
package tbcc_pkg;

  localparam int unsigned Z      = 6;   // lifting size = parallelization factor
  localparam int unsigned NROW   = 4;   // base check rows (layers)
  localparam int unsigned NCOL   = 8;   // base variable columns
  localparam int unsigned NINFO  = 4;   // information columns
  localparam int unsigned MS     = 21;  // code memory size
  localparam int unsigned QW     = 6;   // LLR / message width (4 integer, 2 fraction bits)
  localparam int unsigned SEG    = 26;  // time instants held by one processor
  localparam int unsigned NPROC  = 4;   // processors
  localparam int unsigned DMAX   = 4;   // largest column degree
  localparam int unsigned RDMAX  = 8;   // largest row degree
  localparam int unsigned AW     = 5;   // address width of a segment (26 words)
  localparam int unsigned GW     = Z*QW;          // one lane group: 36 bits
  localparam int unsigned WORDW  = DMAX*GW;       // one variable word: 144 bits
  localparam int unsigned NTIME  = SEG*NPROC;     // time instants in memory: 104
  localparam int unsigned STEPS  = SEG*NROW;      // layer steps per iteration: 104
  localparam int unsigned VW     = QW+3;          // width of an unsaturated sum

  typedef logic signed [QW-1:0] llr_t;
  typedef llr_t [Z-1:0]         lanes_t;          // one lane group (circulant)
  typedef lanes_t [DMAX-1:0]    vword_t;          // all slots of a variable group

  // Frame size modes: frame length of 1, 2 or 4 processors.
  typedef enum logic [1:0] {
    MODE_1P = 2'd0,   // 26 time instants, 1248 code bits, four frames at once
    MODE_2P = 2'd1,   // 52 time instants, 2496 code bits, two frames at once
    MODE_4P = 2'd2    // 104 time instants, 4992 code bits, one frame
  } fmode_e;

  // Chip test modes.
  typedef enum logic [1:0] {
    TM_NORMAL = 2'd0, // decode the frame on the input pins
    TM_BIST   = 2'd1, // decode input pins, compare with reference pins
    TM_RANDOM = 2'd2  // decode an on-chip pseudo-random noisy all-zero frame
  } tmode_e;

  // -1 marks a zero entry of H(D).
  localparam int DELAY [NROW][NCOL] = '{
    '{ 0, 11,  4, 16,  0, -1, -1, -1},
    '{ 5,  0,  2, 18,  2,  0, -1, -1},
    '{ 7,  9,  0,  7, 15, 21,  0, -1},
    '{18, 16,  8,  0,  4,  8,  5,  0}
  };
  localparam int SHIFT [NROW][NCOL] = '{
    '{0, 4, 2, 1, 0, 0, 0, 0},
    '{2, 0, 5, 4, 2, 0, 0, 0},
    '{3, 1, 0, 3, 4, 5, 0, 0},
    '{5, 3, 3, 0, 2, 2, 4, 0}
  };

  // Delay of entry (r,j), 0 for a zero entry.
  function automatic int delay_of(int r, int j);
    return (DELAY[r][j] < 0) ? 0 : DELAY[r][j];
  endfunction

  function automatic bit has_edge(int r, int j);
    return DELAY[r][j] >= 0;
  endfunction

  // Column degree (number of slots of a variable of column j).
  function automatic int col_deg(int j);
    int d = 0;
    for (int r = 0; r < NROW; r++) if (has_edge(r, j)) d++;
    return d;
  endfunction

  // Slot index of row r in column j: rows are numbered in order inside a column.
  function automatic int slot_of(int r, int j);
    int k = 0;
    for (int q = 0; q < int'(NROW); q++) if (q < r && has_edge(q, j)) k++;
    return k;
  endfunction

  // Segment whose variables a processor reaches when the column delay wraps
  // below local time 0: the previous processor of the same frame.
  function automatic logic [1:0] pred_seg(logic [1:0] q, fmode_e m);
    case (m)
      MODE_1P: return q;
      MODE_2P: return {q[1], ~q[0]};
      default: return q - 2'd1;
    endcase
  endfunction

  // Saturate a wide sum to the symmetric message range [-(2^(QW-1)-1), 2^(QW-1)-1].
  function automatic llr_t sat(logic signed [VW-1:0] v);
    localparam int MX = (1 << (QW-1)) - 1;
    if (int'(v) > MX)       return llr_t'(MX);
    else if (int'(v) < -MX) return llr_t'(-MX);
    else              return llr_t'(v);
  endfunction

endpackage
