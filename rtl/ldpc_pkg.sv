// ldpc_pkg: constants, types and shared arithmetic of the IEEE 802.11n
// rate-1/2, n = 648 (Z = 27) LDPC decoder.
//
// The base matrix below is the row- and column-reordered parity check matrix
// of the design: 12 block rows by 24 block columns of Z x Z circulants, entry
// -1 for an all-zero block, 0 for the identity and s > 0 for the identity
// cyclically shifted right by s (row r of the block has its one in column
// (r + s) mod Z). Block rows fall into three check-node groups of four rows
// (CNU1..CNU3) and block columns into three bit-node groups of eight columns
// (BNU1..BNU3). The reordering is chosen so that BNU1 shares no block with
// CNU3 and BNU3 none with CNU1, which lets those pairs run at the same time.
// Codeword bit n = j*Z + c is bit c of block column j in this order.
//
// Messages are 8-bit two's complement fixed point with 4 fraction bits
// (4 integer bits including the sign), saturated symmetrically to +-127/16.
// Edge tables (one entry per non-zero circulant, row-major order) are
// derived from the base matrix by constant functions.
package ldpc_pkg;

  localparam int Z      = 27;         // circulant size
  localparam int NBR    = 12;         // block rows
  localparam int NBC    = 24;         // block columns
  localparam int N      = NBC * Z;    // code length, 648
  localparam int M      = NBR * Z;    // parity checks, 324
  localparam int NGRP   = 3;          // CNU groups = BNU groups
  localparam int RPG    = NBR / NGRP; // block rows per CNU group, 4
  localparam int CPG    = NBC / NGRP; // block columns per BNU group, 8
  localparam int W      = 8;          // message width
  localparam int FRAC   = 4;          // fraction bits of a message
  localparam int ZW     = $clog2(Z);
  localparam int MAXQ   = (1 << (W - 1)) - 1; // 127: saturation limit

  typedef logic signed [W-1:0] llr_t;

  typedef int hb_row_t [NBC];
  typedef hb_row_t hb_t [NBR];

  localparam hb_t HB = '{
    '{ 0, -1,  1,  0, -1, -1, -1, -1,  0,  0,  0, -1, -1, -1, -1,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{10, 20, -1, -1,  0,  0, -1, -1,  7, 22, 23, -1, 16, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1,  0,  0, -1, 11, 19, 13, -1, -1, -1,  3, 17, -1, -1, -1, -1, -1, -1, -1, -1},
    '{18, -1, -1, -1, -1, -1,  0,  0, 25, 23,  9,  8, -1, 14, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1,  1, -1, -1, -1, -1,  0,  3, 16, 25, -1, -1,  2, -1, -1, -1,  5, -1, -1, -1, -1, -1, -1},
    '{-1, 24, -1, -1,  0, -1, -1, -1, 13,  0,  6, -1, -1, -1, -1, -1,  8, -1, -1, -1, -1, -1, -1,  0},
    '{-1, -1,  0, -1, -1, -1, -1, -1, 25,  8,  7, -1, -1, -1, -1, -1, -1, 18, -1, -1, -1, -1,  0,  0},
    '{-1,  0, -1,  0, -1, -1, -1, -1, 22, 17, 12, -1, -1,  0, -1, -1,  0, -1,  0, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, 23,  3,  0, -1, -1, -1,  9, 11, -1, -1, -1, -1,  0,  0, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1,  2, 20, 25, -1,  0, -1, -1, -1, -1,  0, -1,  0,  0, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1,  6, 10, 24,  0, -1, -1,  0, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, 24, 17, 10, 23,  1, -1, -1, -1,  3, -1, -1, -1, -1,  0,  0, -1}
  };

  // ---------------------------------------------------------------------
  // Derived graph tables
  // ---------------------------------------------------------------------
  function automatic int f_nnz();
    int n = 0;
    for (int i = 0; i < NBR; i++)
      for (int j = 0; j < NBC; j++)
        if (HB[i][j] >= 0) n++;
    return n;
  endfunction

  localparam int NE = f_nnz();  // 88 non-zero circulants = edge memories

  function automatic int f_row_deg(int i);
    int d = 0;
    for (int j = 0; j < NBC; j++) if (HB[i][j] >= 0) d++;
    return d;
  endfunction

  function automatic int f_col_deg(int j);
    int d = 0;
    for (int i = 0; i < NBR; i++) if (HB[i][j] >= 0) d++;
    return d;
  endfunction

  // Widest check-node and bit-node unit port count needed by unit k over
  // the three groups it serves.
  function automatic int f_cnu_deg(int k);
    int d = 0;
    for (int g = 0; g < NGRP; g++)
      if (f_row_deg(g * RPG + k) > d) d = f_row_deg(g * RPG + k);
    return d;
  endfunction

  function automatic int f_bnu_deg(int k);
    int d = 0;
    for (int g = 0; g < NGRP; g++)
      if (f_col_deg(g * CPG + k) > d) d = f_col_deg(g * CPG + k);
    return d;
  endfunction

  function automatic int f_max_row_deg();
    int d = 0;
    for (int i = 0; i < NBR; i++) if (f_row_deg(i) > d) d = f_row_deg(i);
    return d;
  endfunction

  function automatic int f_max_col_deg();
    int d = 0;
    for (int j = 0; j < NBC; j++) if (f_col_deg(j) > d) d = f_col_deg(j);
    return d;
  endfunction

  localparam int DC_MAX = f_max_row_deg();  // 8
  localparam int DV_MAX = f_max_col_deg();  // 12

  // Per-edge tables, index = edge number (row-major order of the blocks).
  typedef int etbl_t [NE];

  // sel: 0 block row, 1 block column, 2 shift, 3 port on the row's CNU,
  // 4 port on the column's BNU
  function automatic etbl_t f_etbl(int sel);
    etbl_t t;
    int cnt [NBC];
    int n = 0;
    for (int j = 0; j < NBC; j++) cnt[j] = 0;
    for (int i = 0; i < NBR; i++) begin
      int rp = 0;
      for (int j = 0; j < NBC; j++)
        if (HB[i][j] >= 0) begin
          case (sel)
            0:       t[n] = i;
            1:       t[n] = j;
            2:       t[n] = HB[i][j];
            3:       t[n] = rp;
            default: t[n] = cnt[j];
          endcase
          rp++;
          cnt[j]++;
          n++;
        end
    end
    return t;
  endfunction

  localparam etbl_t EDGE_ROW   = f_etbl(0);
  localparam etbl_t EDGE_COL   = f_etbl(1);
  localparam etbl_t EDGE_SHIFT = f_etbl(2);
  localparam etbl_t EDGE_RPOS  = f_etbl(3);
  localparam etbl_t EDGE_CPOS  = f_etbl(4);

  // Edge on port p of CNU unit k while CNU group g is active (-1: none),
  // at index (g*RPG + k)*DC_MAX + p, and edge on port p of BNU unit k while
  // BNU group g is active, at index (g*CPG + k)*DV_MAX + p.
  typedef int ctbl_t [NGRP*RPG*DC_MAX];
  typedef int btbl_t [NGRP*CPG*DV_MAX];

  function automatic ctbl_t f_ctbl();
    ctbl_t t;
    int n = 0;
    for (int x = 0; x < NGRP * RPG * DC_MAX; x++) t[x] = -1;
    for (int i = 0; i < NBR; i++) begin
      int rp = 0;
      for (int j = 0; j < NBC; j++)
        if (HB[i][j] >= 0) begin
          t[i * DC_MAX + rp] = n;  // i = g*RPG + k
          rp++;
          n++;
        end
    end
    return t;
  endfunction

  function automatic btbl_t f_btbl();
    btbl_t t;
    int cnt [NBC];
    int n = 0;
    for (int x = 0; x < NGRP * CPG * DV_MAX; x++) t[x] = -1;
    for (int j = 0; j < NBC; j++) cnt[j] = 0;
    for (int i = 0; i < NBR; i++)
      for (int j = 0; j < NBC; j++)
        if (HB[i][j] >= 0) begin
          t[j * DV_MAX + cnt[j]] = n;  // j = g*CPG + k
          cnt[j]++;
          n++;
        end
    return t;
  endfunction

  localparam ctbl_t CNU_EDGE = f_ctbl();
  localparam btbl_t BNU_EDGE = f_btbl();

  // True when BNU group b and CNU group c share no non-zero block, so that
  // they may be active in the same cycle.
  function automatic bit f_disjoint(int b, int c);
    for (int i = c * RPG; i < (c + 1) * RPG; i++)
      for (int j = b * CPG; j < (b + 1) * CPG; j++)
        if (HB[i][j] >= 0) return 1'b0;
    return 1'b1;
  endfunction

  // (a - b) mod Z for 0 <= a, b < Z
  function automatic logic [ZW-1:0] f_submod(logic [ZW-1:0] a, int b);
    int d;
    d = int'(a) - b;
    if (d < 0) d += Z;
    return ZW'(d);
  endfunction

  // ---------------------------------------------------------------------
  // Message arithmetic
  // ---------------------------------------------------------------------
  // Symmetric saturation of a wide value to a message.
  function automatic llr_t f_sat(logic signed [15:0] v);
    if (v > 16'(MAXQ))  return llr_t'(MAXQ);
    if (v < -16'(MAXQ)) return llr_t'(-MAXQ);
    return llr_t'(v);
  endfunction

  // Correction term log(1 + exp(-x)) for x >= 0 in units of 1/16, rounded
  // to the nearest 1/16: f(x) = round(16 * ln(1 + exp(-x / 16))).
  function automatic logic [3:0] f_corr(logic [9:0] x);
    if (x < 10'd2)  return 4'd11;
    if (x < 10'd4)  return 4'd10;
    if (x < 10'd6)  return 4'd9;
    if (x < 10'd9)  return 4'd8;
    if (x < 10'd12) return 4'd7;
    if (x < 10'd15) return 4'd6;
    if (x < 10'd18) return 4'd5;
    if (x < 10'd23) return 4'd4;
    if (x < 10'd29) return 4'd3;
    if (x < 10'd38) return 4'd2;
    if (x < 10'd56) return 4'd1;
    return 4'd0;
  endfunction

  // Min-sum-correct pairwise check operation (box-plus):
  //   a [+] b = sign(a) sign(b) min(|a|,|b|) + f(|a+b|) - f(|a-b|)
  function automatic llr_t f_boxplus(llr_t a, llr_t b);
    logic signed [9:0] sa, sb, mag_a, mag_b, mn, s, d, res;
    logic [9:0] abs_s, abs_d;
    sa    = 10'(a);
    sb    = 10'(b);
    mag_a = (sa < 0) ? -sa : sa;
    mag_b = (sb < 0) ? -sb : sb;
    mn    = (mag_a < mag_b) ? mag_a : mag_b;
    s     = sa + sb;
    d     = sa - sb;
    abs_s = (s < 0) ? 10'(-s) : 10'(s);
    abs_d = (d < 0) ? 10'(-d) : 10'(d);
    res   = (((sa < 0) != (sb < 0)) ? -mn : mn)
          + 10'(signed'({1'b0, f_corr(abs_s)}))
          - 10'(signed'({1'b0, f_corr(abs_d)}));
    return f_sat(16'(res));
  endfunction

endpackage
