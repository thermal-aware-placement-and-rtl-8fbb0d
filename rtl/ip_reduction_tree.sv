// ip_reduction_tree: weighted sum of the PE counts (reduction tree and
// vector merging adder).
//
// Input is the pipeline register: M*N counter words of W bits, word (i,j) at
// bits [(i*N+j)*W +: W]. Bit b of word (i,j) has weight 2^(i+j+b), so all
// words together form a composite bit matrix whose column c holds every bit
// with i+j+b = c. The matrix is reduced to two rows with full and half
// adders, then the two rows are added by one carry-propagate adder (the
// vector merging adder). The result is the sum modulo 2^PW.
//
// TREE selects the reduction schedule:
//  * TREE_DADDA: stage targets 2,3,4,6,9,13,... (d_{k+1} = floor(1.5 d_k));
//    in each stage a column is reduced only as far as needed to reach the
//    stage target, counting the carries that arrive from the column below.
//  * TREE_WALLACE: in each stage every complete group of three bits of a
//    column goes to a full adder and a leftover pair to a half adder.
// Carries produced in a stage are only used as adder inputs in the next
// stage. The source names the two tree types and the adder cells (full
// adder, half adder, carry-save adder); the schedules are the textbook ones
// and the bit ordering inside a column is this design's choice.
//
// Purely combinational; the surrounding array registers its input.
module ip_reduction_tree
  import ip_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned N     = 4,
  parameter int unsigned L     = 7,
  parameter tree_e       TREE  = TREE_DADDA,
  localparam int unsigned W    = cnt_width(L),
  localparam int unsigned PW   = prod_width(M, N, L)
) (
  input  logic [M*N*W-1:0] counts,
  output logic [PW-1:0]    sum
);

  localparam int unsigned COLS = PW;
  localparam int unsigned MAXH = M * N * W + 2;

  // Elaboration-time model of the reduction schedule. sched(s, c, what)
  // returns, for stage s and column c: what = 0 the column height entering
  // the stage, 1 the number of full adders, 2 the number of half adders.
  // sched(-1, 0, 3) returns the number of stages needed to reach height 2.
  function automatic int sched(input int s, input int c, input int what);
    int h  [COLS];
    int nf [COLS];
    int nh [COLS];
    int maxh, d, total, avail, cin, stage;
    for (int k = 0; k < COLS; k++) h[k] = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        for (int b = 0; b < W; b++)
          if (i + j + b < COLS) h[i+j+b]++;
    stage = 0;
    for (int it = 0; it < 64; it++) begin
      maxh = 0;
      for (int k = 0; k < COLS; k++) if (h[k] > maxh) maxh = h[k];
      if (maxh <= 2) begin
        if (what == 3) return stage;
        if (what == 0 && s == stage) return h[c];
        return 0;
      end
      // Dadda stage target: largest d_k = floor(1.5 d_(k-1)), d_1 = 2, below maxh.
      d = 2;
      while ((d * 3) / 2 < maxh) d = (d * 3) / 2;
      cin = 0;
      for (int k = 0; k < COLS; k++) begin
        nf[k] = 0;
        nh[k] = 0;
        if (TREE == TREE_DADDA) begin
          total = h[k] + cin;
          avail = h[k];
          while (total > d && avail >= 2) begin
            if (total >= d + 2 && avail >= 3) begin
              nf[k]++; avail -= 3; total -= 2;
            end else begin
              nh[k]++; avail -= 2; total -= 1;
            end
          end
        end else begin
          nf[k] = h[k] / 3;
          nh[k] = (h[k] % 3 == 2) ? 1 : 0;
        end
        cin = nf[k] + nh[k];
      end
      if (s == stage) begin
        if (what == 0) return h[c];
        if (what == 1) return nf[c];
        if (what == 2) return nh[c];
      end
      cin = 0;
      for (int k = 0; k < COLS; k++) begin
        h[k] = h[k] - 2 * nf[k] - nh[k] + cin;
        cin  = nf[k] + nh[k];
      end
      stage++;
    end
    return 0;
  endfunction

  localparam int unsigned NST = sched(-1, 0, 3);

  // m0[c]: the bits of column c entering the first stage; q of stage s,
  // column c: the bits leaving it. Bits are packed from position 0 up,
  // unused positions are zero.
  logic [MAXH-1:0] m0 [COLS];
  logic [PW-1:0]   row0, row1;

  // Composite bit matrix: bit b of counter (i,j) goes to column i+j+b.
  always_comb begin
    int unsigned h0 [COLS];
    for (int k = 0; k < COLS; k++) begin
      m0[k] = '0;
      h0[k] = 0;
    end
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) begin
        for (int b = 0; b < W; b++) begin
          if (i + j + b < COLS) begin
            m0[i+j+b][h0[i+j+b]] = counts[(i * N + j) * W + b];
            h0[i+j+b]            = h0[i+j+b] + 1;
          end
        end
      end
    end
  end

  // Reduction stages. A column's next-stage bits are, in order: its full
  // adder sums, its half adder sums, the bits it passes on unchanged, then
  // the carries of the full and half adders of the column below.
  for (genvar s = 0; s < NST; s++) begin : g_stage
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int HC  = sched(s, c, 0);
      localparam int NF  = sched(s, c, 1);
      localparam int NH  = sched(s, c, 2);
      localparam int NP  = HC - 3 * NF - 2 * NH;
      localparam int NFP = (c > 0) ? sched(s, c - 1, 1) : 0;
      localparam int NHP = (c > 0) ? sched(s, c - 1, 2) : 0;

      logic [MAXH-1:0] cur, below, q;

      if (s == 0) begin : g_in
        always_comb cur = m0[c];
      end else begin : g_in
        always_comb cur = g_stage[s-1].g_col[c].q;
      end

      if (c == 0) begin : g_below
        always_comb below = '0;
      end else if (s == 0) begin : g_below
        always_comb below = m0[c-1];
      end else begin : g_below
        always_comb below = g_stage[s-1].g_col[c-1].q;
      end

      always_comb begin
        q = '0;
        for (int f = 0; f < NF; f++)
          q[f] = cur[3*f] ^ cur[3*f+1] ^ cur[3*f+2];
        for (int g = 0; g < NH; g++)
          q[NF+g] = cur[3*NF+2*g] ^ cur[3*NF+2*g+1];
        for (int p = 0; p < NP; p++)
          q[NF+NH+p] = cur[3*NF+2*NH+p];
        for (int f = 0; f < NFP; f++)
          q[NF+NH+NP+f] = (below[3*f] & below[3*f+1]) | (below[3*f] & below[3*f+2])
                        | (below[3*f+1] & below[3*f+2]);
        for (int g = 0; g < NHP; g++)
          q[NF+NH+NP+NFP+g] = below[3*NFP+2*g] & below[3*NFP+2*g+1];
      end
    end
  end

  // Two rows left: vector merging adder.
  for (genvar k = 0; k < COLS; k++) begin : g_rows
    if (NST == 0) begin : g_last
      always_comb begin
        row0[k] = m0[k][0];
        row1[k] = m0[k][1];
      end
    end else begin : g_last
      always_comb begin
        row0[k] = g_stage[NST-1].g_col[k].q[0];
        row1[k] = g_stage[NST-1].g_col[k].q[1];
      end
    end
  end

  always_comb sum = row0 + row1;

endmodule
