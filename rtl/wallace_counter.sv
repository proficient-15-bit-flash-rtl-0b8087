// wallace_counter: counts the ones among N comparator decisions with a
// Wallace tree of full and half adders.
//
// Because the comparator trip points are random, the comparator outputs are
// not a clean thermometer code and a thermometer-to-binary decoder would be
// thrown off by bubbles. Counting the ones is immune to bubbles: any N-bit
// pattern with k ones gives k. The count is formed by a Wallace tree: at each
// level, every column of equal-weight bits is cut into groups of three, each
// reduced by a full adder to a sum (same column) and a carry (next column); a
// leftover pair goes to a half adder and a single bit passes through. Levels
// repeat until no column holds more than two bits, and one carry-propagate
// addition of the two remaining rows gives the count. The depth grows with
// log(N) rather than N, as with a chain of adders.
//
// The reduction schedule (bits per column per level) is computed at
// elaboration by constant functions, so any N works. Carries out of the top
// column are dropped: the count never exceeds N < 2**W, so they are always 0.
//
// Interface: din is the N-bit comparator word; count = number of ones, W =
// ceil(log2(N+1)) bits (4 bits for the 15 comparators). With PIPE = 1 the
// count is registered (one cycle latency); with PIPE = 0 it is combinational.
//
// Follows the document: ones counting by a Wallace tree, an N-bit input
// giving a log2(N)-bit total, the optional pipeline register it suggests.
// Own choices: half adders on leftover pairs and the final adder written as
// an ordinary addition.
module wallace_counter
  import flash_adc_pkg::*;
#(
  parameter int unsigned N    = N_COMP,
  parameter bit          PIPE = 1'b1,
  localparam int unsigned W   = count_width(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] din,
  output logic [W-1:0] count
);

  localparam int MAXL = 32;   // bound on levels, far above any practical N
  localparam int MAXW = 32;   // bound on columns

  // Bits in column col after lvl levels of Wallace reduction.
  function automatic int cnt_at(input int lvl, input int col);
    int cur [MAXW];
    int nxt [MAXW];
    for (int c = 0; c < MAXW; c++) cur[c] = 0;
    cur[0] = int'(N);
    for (int l = 0; l < lvl; l++) begin
      for (int c = 0; c < MAXW; c++) nxt[c] = 0;
      for (int c = 0; c < int'(W); c++) begin
        int fa, ha, ps;
        fa = cur[c] / 3;
        ha = (cur[c] % 3 == 2) ? 1 : 0;
        ps = (cur[c] % 3 == 1) ? 1 : 0;
        nxt[c] += fa + ha + ps;
        if (c + 1 < int'(W)) nxt[c+1] += fa + ha;
      end
      for (int c = 0; c < MAXW; c++) cur[c] = nxt[c];
    end
    return cur[col];
  endfunction

  // Number of levels until every column holds at most two bits.
  function automatic int n_levels();
    for (int l = 0; l < MAXL; l++) begin
      bit done;
      done = 1'b1;
      for (int c = 0; c < int'(W); c++)
        if (cnt_at(l, c) > 2) done = 1'b0;
      if (done) return l;
    end
    return MAXL;
  endfunction

  localparam int L    = n_levels();
  localparam int MAXB = (N > 2) ? int'(N) : 2;

  // Bit b of column c (weight 2**c) is element [c][b] of a level's vector.
  typedef logic [W-1:0][MAXB-1:0] level_t;
  level_t lvl0;

  // Level 0: all inputs have weight 1.
  for (genvar c = 0; c < W; c++) begin : g_l0
    for (genvar b = 0; b < MAXB; b++) begin : g_b
      if (c == 0 && b < N) begin : g_in
        assign lvl0[c][b] = din[b];
      end else begin : g_zero
        assign lvl0[c][b] = 1'b0;
      end
    end
  end

  // Level l reads src (the result of level l-1) and drives dst.
  for (genvar l = 0; l < L; l++) begin : g_lvl
    level_t src, dst;
    if (l == 0) begin : g_first
      assign src = lvl0;
    end else begin : g_next
      assign src = g_lvl[l-1].dst;
    end
    for (genvar c = 0; c < W; c++) begin : g_col
      // Column c at level l: full adders, then a half adder or a pass bit.
      localparam int NB  = cnt_at(l, c);
      localparam int FA  = NB / 3;
      localparam int HA  = (NB % 3 == 2) ? 1 : 0;
      localparam int PS  = (NB % 3 == 1) ? 1 : 0;
      localparam int OWN = FA + HA + PS;
      // Column c-1 at level l, whose carries land in this column.
      localparam int NBP = (c > 0) ? cnt_at(l, c - 1) : 0;
      localparam int FAP = NBP / 3;
      localparam int HAP = (NBP % 3 == 2) ? 1 : 0;
      localparam int OUT = OWN + FAP + HAP;

      // Sums of this column's full adders.
      for (genvar k = 0; k < FA; k++) begin : g_fa_sum
        assign dst[c][k] = src[c][3*k] ^ src[c][3*k+1] ^ src[c][3*k+2];
      end
      // Sum of the half adder, or the single bit passed through.
      if (HA == 1) begin : g_ha_sum
        assign dst[c][FA] = src[c][3*FA] ^ src[c][3*FA+1];
      end else if (PS == 1) begin : g_pass
        assign dst[c][FA] = src[c][3*FA];
      end
      // Carries of column c-1's full adders (majority of the three inputs).
      for (genvar k = 0; k < FAP; k++) begin : g_fa_carry
        logic a, b, ci;
        assign a  = src[c-1][3*k];
        assign b  = src[c-1][3*k+1];
        assign ci = src[c-1][3*k+2];
        assign dst[c][OWN + k] = (a & b) | (a & ci) | (b & ci);
      end
      // Carry of column c-1's half adder.
      if (HAP == 1) begin : g_ha_carry
        assign dst[c][OWN + FAP] = src[c-1][3*FAP] & src[c-1][3*FAP+1];
      end
      // Unused positions are tied low.
      for (genvar b = OUT; b < MAXB; b++) begin : g_zero
        assign dst[c][b] = 1'b0;
      end
    end
  end

  // Final carry-propagate addition of the two remaining rows.
  logic [W-1:0] row0, row1, sum;
  level_t last;
  if (L == 0) begin : g_nolvl
    assign last = lvl0;
  end else begin : g_lastlvl
    assign last = g_lvl[L-1].dst;
  end
  for (genvar c = 0; c < W; c++) begin : g_rows
    assign row0[c] = last[c][0];
    assign row1[c] = last[c][1];
  end
  assign sum = row0 + row1;

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (!rst_n) count <= '0;
      else        count <= sum;
    end
  end else begin : g_comb
    assign count = sum;
  end

endmodule
