// ip_array: counter-based inner-product array (merged arithmetic).
//
// Computes P = sum_{k=0}^{L-1} A_k * B_k. One element pair (A_k, B_k) enters
// per clock1 cycle on 2 x M input pins. An M x N grid of processing elements
// counts, for every bit position (i,j), how many of the L partial-product
// bits A_k(i)&B_k(j) are one, so the L vertical bits of each position shrink
// to W = floor(log2 L)+1 horizontal bits. After the L-th element the counts
// move into the pipeline register (the clock2 = L x clock1 edge) and a
// reduction tree with a vector merging adder forms the weighted sum
// sum C(i,j) 2^(i+j).
//
// SIGNED_MODE = 0: unsigned operands, all PEs use AND.
// SIGNED_MODE = 1: two's-complement operands (modified Baugh-Wooley). The
// PEs of the sign row (i = M-1, j < N-1) and sign column (j = N-1, i < M-1)
// use NAND, and the constant eps = L(-2^(M+N-1) + 2^(M-1) + 2^(N-1)) is added
// to the tree output. P is then a PW-bit two's-complement number.
//
// Interface: `in_valid` qualifies `a`/`b`; elements are counted into vectors
// of L, back to back. Timing: if the last element of a vector is accepted in
// cycle t, `out_valid` pulses in cycle t+2 and `p` holds the result from
// then until the next result. A new vector may start in cycle t+1, so the
// throughput is one inner product per L cycles. The structure (PE grid,
// pipeline register, tree, error constant) follows the source; the single
// clock with a load enable, `in_valid` and the output timing are this
// design's choices.
module ip_array
  import ip_pkg::*;
#(
  parameter int unsigned M           = 4,
  parameter int unsigned N           = 4,
  parameter int unsigned L           = 7,
  parameter bit          SIGNED_MODE = 1'b0,
  parameter tree_e       TREE        = TREE_DADDA,
  localparam int unsigned W          = cnt_width(L),
  localparam int unsigned PW         = prod_width(M, N, L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [M-1:0]  a,
  input  logic [N-1:0]  b,
  output logic          out_valid,
  output logic [PW-1:0] p
);

  localparam logic [PW-1:0] EPS = SIGNED_MODE ? PW'(signed_eps(M, N, L)) : '0;

  logic                   clr, load;
  logic [M*N*W-1:0]       counts, counts_q;
  logic [PW-1:0]          tree_sum;

  ip_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .in_valid, .clr, .load, .phase()
  );

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      ip_pe #(
        .W     (W),
        .INVERT(pe_is_nand(SIGNED_MODE, i, j, M, N))
      ) u_pe (
        .clk,
        .rst_n,
        .en   (in_valid),
        .clr  (clr),
        .a_bit(a[i]),
        .b_bit(b[j]),
        .count(counts[(i * N + j) * W +: W])
      );
    end
  end

  ip_pipe_reg #(.WIDTH(M * N * W)) u_pipe (
    .clk, .rst_n, .load, .d(counts), .q(counts_q), .valid(out_valid)
  );

  ip_reduction_tree #(.M(M), .N(N), .L(L), .TREE(TREE)) u_tree (
    .counts(counts_q), .sum(tree_sum)
  );

  always_comb p = tree_sum + EPS;

endmodule
