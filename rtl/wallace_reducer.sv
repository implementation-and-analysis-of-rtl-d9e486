// wallace_reducer: the Wallace tree. Takes the N x N partial-product bits
// and reduces them, stage by stage, to two 2N-bit rows whose sum is the
// product. The rows go to the final prefix adder.
//
// How it works. The partial products are regrouped by weight into 2N
// columns (column c holds every bit of weight 2^c; at most N of them).
// In every stage each column is cut greedily, in this order, into:
//   * groups of 15 bits -> 15:4 compressor (outputs go to columns c..c+3),
//   * groups of 5 of what is left -> 5:3 compressor (columns c..c+2),
//   * groups of 3 of what is left -> full adder (columns c, c+1),
//   * a remaining pair -> half adder (columns c, c+1), but only when the
//     column holds more than two bits,
//   * anything else passes through to the next stage unchanged.
// Stages repeat until no column holds more than two bits. The column
// heights, the number of each counter per column, the wiring offsets and
// the number of stages are all worked out at elaboration time by the
// constant functions below, so the tree follows N. For N = 16 there are
// six stages, using three 15:4 compressors, 55 5:3 compressors, 64 full
// adders and 7 half adders.
//
// The use of 15:4 and 5:3 compressors, full and half adders follows the
// multiplier's description; the greedy per-stage cutting rule and the bit
// order inside each column are this design's own choices.
//
// Bits that would land in column 2N or above are dropped: the product of
// two N-bit numbers is below 2^(2N), so every such bit is always 0. The
// sum of the two rows is exact modulo 2^(2N). N must be at least 3.
// Purely combinational.
module wallace_reducer #(
  parameter int N = 16
) (
  input  logic [N-1:0][N-1:0]  pp,    // pp[i][j] has weight 2^(i+j)
  output logic [2*N-1:0]       row0,
  output logic [2*N-1:0]       row1
);
  localparam int NCOL  = 2 * N;
  localparam int HBITS = 8;           // column heights are at most 255

  typedef logic [NCOL-1:0][HBITS-1:0] hvec_t;

  // Kinds of cell, in the order their outputs are packed into a column.
  localparam int K_PASS = 0;
  localparam int K_C15  = 1;
  localparam int K_C53  = 2;
  localparam int K_FA   = 3;
  localparam int K_HA   = 4;

  // ---- per-column cell counts for a column of height h ----
  function automatic int n15(int h);
    return h / 15;
  endfunction
  function automatic int n53(int h);
    return (h % 15) / 5;
  endfunction
  function automatic int nfa(int h);
    return ((h % 15) % 5) / 3;
  endfunction
  function automatic int nha(int h);
    return (((h % 15) % 5) % 3 == 2 && h > 2) ? 1 : 0;
  endfunction
  function automatic int npass(int h);
    return ((h % 15) % 5) % 3 - 2 * nha(h);
  endfunction

  // Number of cells of a kind in a column.
  function automatic int ncells(int h, int kind);
    case (kind)
      K_C15:   return n15(h);
      K_C53:   return n53(h);
      K_FA:    return nfa(h);
      K_HA:    return nha(h);
      default: return npass(h);
    endcase
  endfunction

  // Number of output bits of a kind of cell (1 for a passed-through bit).
  function automatic int nouts(int kind);
    case (kind)
      K_C15:   return 4;
      K_C53:   return 3;
      K_FA:    return 2;
      K_HA:    return 2;
      default: return 1;
    endcase
  endfunction

  function automatic int col_height(hvec_t hv, int c);
    return (c >= 0 && c < NCOL) ? int'(hv[c]) : 0;
  endfunction

  // Index in column c of the next stage where the outputs of bit weight j
  // (j = 0 is the cell's own column) of the cells of a kind, sitting in
  // column c - j, start. Order: pass-throughs, then for each kind of
  // counter and each output weight j, the counters of column c - j.
  function automatic int dst(hvec_t hv, int c, int kind, int j);
    int idx;
    idx = 0;
    for (int k = K_PASS; k <= K_HA; k++) begin
      for (int jj = 0; jj < nouts(k); jj++) begin
        if (k == kind && jj == j) return idx;
        idx += ncells(col_height(hv, c - jj), k);
      end
    end
    return idx;
  endfunction

  function automatic hvec_t first_heights();
    hvec_t hv;
    for (int c = 0; c < NCOL; c++) begin
      int h;
      h = c + 1;
      if (h > N) h = N;
      if (h > NCOL - 1 - c) h = NCOL - 1 - c;
      hv[c] = HBITS'(h);
    end
    return hv;
  endfunction

  function automatic hvec_t next_heights(hvec_t hv);
    hvec_t nh;
    for (int c = 0; c < NCOL; c++) begin
      // The index after the last kind is the column's total height.
      nh[c] = HBITS'(dst(hv, c, K_HA + 1, 0));
    end
    return nh;
  endfunction

  function automatic int max_height(hvec_t hv);
    int m;
    m = 0;
    for (int c = 0; c < NCOL; c++) if (int'(hv[c]) > m) m = int'(hv[c]);
    return m;
  endfunction

  function automatic hvec_t heights(int s);
    hvec_t hv;
    hv = first_heights();
    for (int k = 0; k < s; k++) hv = next_heights(hv);
    return hv;
  endfunction

  function automatic int num_stages();
    hvec_t hv;
    int s;
    hv = first_heights();
    s  = 0;
    while (max_height(hv) > 2 && s < 64) begin
      hv = next_heights(hv);
      s++;
    end
    return s;
  endfunction

  function automatic int tallest();
    hvec_t hv;
    int m;
    hv = first_heights();
    m  = max_height(hv);
    for (int s = 0; s < num_stages(); s++) begin
      hv = next_heights(hv);
      if (max_height(hv) > m) m = max_height(hv);
    end
    return m;
  endfunction

  localparam int NST  = num_stages();
  localparam int MAXH = tallest();

  // Two-bit operands need no reduction stage; the tree needs N >= 3.
  if (N < 3) begin : g_bad_n
    $error("wallace_reducer: N must be at least 3");
  end

  // col0[c] holds the partial-product bits of weight 2^c. Each stage has
  // its own copy of its input columns (cur) and its output columns (nxt);
  // only the low heights(s)[c] bits of a column are used, the rest are
  // tied to 0.
  logic [MAXH-1:0] col0 [NCOL];

  // ---- stage 0: sort the partial products into columns ----
  localparam hvec_t HV0 = heights(0);
  for (genvar c = 0; c < NCOL; c++) begin : g_in
    localparam int LO = (c - N + 1 > 0) ? c - N + 1 : 0;   // lowest row
    localparam int H  = int'(HV0[c]);
    for (genvar i = 0; i < MAXH; i++) begin : g_bit
      if (i < H) begin : g_pp
        assign col0[c][i] = pp[LO + i][c - LO - i];
      end else begin : g_zero
        assign col0[c][i] = 1'b0;
      end
    end
  end

  // ---- reduction stages ----
  for (genvar s = 0; s < NST; s++) begin : g_stage
    localparam hvec_t HV = heights(s);
    localparam hvec_t HN = heights(s + 1);
    logic [MAXH-1:0] cur [NCOL];
    logic [MAXH-1:0] nxt [NCOL];

    if (s == 0) begin : g_first
      assign cur = col0;
    end else begin : g_chain
      assign cur = g_stage[s-1].nxt;
    end

    for (genvar c = 0; c < NCOL; c++) begin : g_col
      localparam int H    = int'(HV[c]);
      localparam int N15  = n15(H);
      localparam int N53  = n53(H);
      localparam int NFA  = nfa(H);
      localparam int NHA  = nha(H);
      localparam int NP   = npass(H);
      localparam int B53  = 15 * N15;          // first input bit of each kind
      localparam int BFA  = B53 + 5 * N53;
      localparam int BHA  = BFA + 3 * NFA;
      localparam int BP   = BHA + 2 * NHA;

      for (genvar k = 0; k < N15; k++) begin : g_c15
        logic [3:0] y;
        compressor_15_4 u_c15 (.x(cur[c][15*k +: 15]), .y(y));
        for (genvar j = 0; j < 4; j++) begin : g_out
          if (c + j < NCOL) begin : g_keep
            assign nxt[c+j][dst(HV, c + j, K_C15, j) + k] = y[j];
          end
        end
      end

      for (genvar k = 0; k < N53; k++) begin : g_c53
        logic [2:0] y;
        compressor_5_3 u_c53 (.x(cur[c][B53 + 5*k +: 5]), .y(y));
        for (genvar j = 0; j < 3; j++) begin : g_out
          if (c + j < NCOL) begin : g_keep
            assign nxt[c+j][dst(HV, c + j, K_C53, j) + k] = y[j];
          end
        end
      end

      for (genvar k = 0; k < NFA; k++) begin : g_fa
        logic [1:0] y;
        full_adder u_fa (.a(cur[c][BFA + 3*k]), .b(cur[c][BFA + 3*k + 1]),
                         .ci(cur[c][BFA + 3*k + 2]), .s(y[0]), .co(y[1]));
        for (genvar j = 0; j < 2; j++) begin : g_out
          if (c + j < NCOL) begin : g_keep
            assign nxt[c+j][dst(HV, c + j, K_FA, j) + k] = y[j];
          end
        end
      end

      for (genvar k = 0; k < NHA; k++) begin : g_ha
        logic [1:0] y;
        half_adder u_ha (.a(cur[c][BHA + 2*k]), .b(cur[c][BHA + 2*k + 1]),
                         .s(y[0]), .c(y[1]));
        for (genvar j = 0; j < 2; j++) begin : g_out
          if (c + j < NCOL) begin : g_keep
            assign nxt[c+j][dst(HV, c + j, K_HA, j) + k] = y[j];
          end
        end
      end

      for (genvar k = 0; k < NP; k++) begin : g_pass
        assign nxt[c][k] = cur[c][BP + k];
      end

      // Unused positions of this column in the next stage.
      for (genvar i = int'(HN[c]); i < MAXH; i++) begin : g_zero
        assign nxt[c][i] = 1'b0;
      end
    end
  end

  // ---- the two rows left after the last stage ----
  for (genvar c = 0; c < NCOL; c++) begin : g_out
    assign row0[c] = g_stage[NST-1].nxt[c][0];
    assign row1[c] = g_stage[NST-1].nxt[c][1];
  end
endmodule
