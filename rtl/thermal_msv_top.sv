// thermal_msv_top: the thermal-aware multi-voltage design point.
//
// Two parts stand side by side, each with its own ports:
//  * msv_proximity, then msv_select. From the placed rectangles and powers
//    the first computes each block's proximity factor P_B (eq. 5); when it
//    is done it starts the block selection engine with those factors in
//    place of the `proximity` fields of `sel_blk`. The engine rates the blocks
//    by thermal cost, marks the hot ones for edge placement, assigns each
//    block a supply rail (low, medium, high) that still meets the critical
//    timing, estimates its power and white space, and flags soft blocks to
//    enlarge;
//  * the counter-based inner-product multiplier of the signal-processing
//    case study, in its unsigned (u_*) and signed two's-complement (s_*)
//    forms, both with the Dadda reduction tree by default.
// All parts share one clock and an active-low asynchronous reset. See the
// individual modules for their timing. Putting the three parts under one
// top is this design's choice; the source evaluates them separately.
module thermal_msv_top
  import ip_pkg::*;
  import msv_pkg::*;
#(
  parameter int unsigned M    = 4,            // word length of A_k
  parameter int unsigned N    = 4,            // word length of B_k
  parameter int unsigned L    = 7,            // inner product length
  parameter tree_e       TREE = TREE_DADDA,
  parameter int unsigned NBLK = 10,           // floorplan blocks
  localparam int unsigned PW  = prod_width(M, N, L)
) (
  input  logic              clk,
  input  logic              rst_n,
  // block selection engine
  input  logic              sel_start,
  input  blk_in_t           sel_blk [NBLK],   // hold while sel_busy
  input  blk_geom_t         sel_geom [NBLK],  // hold while sel_busy
  input  logic [7:0]        sel_alpha,
  input  logic [7:0]        sel_beta,
  input  logic [7:0]        sel_gamma,
  input  logic [7:0]        sel_act_thresh,
  input  logic [DW-1:0]     sel_t_crit,
  input  logic [DW-1:0]     sel_freq,
  input  logic [COST_W-1:0] sel_eps_thresh,
  input  logic [7:0]        sel_ws_scale,
  output logic              sel_busy,
  output logic              sel_done,
  output blk_out_t          sel_res [NBLK],
  output logic [DW-1:0]     sel_pb [NBLK],    // proximity factors used
  // unsigned inner-product array
  input  logic              u_in_valid,
  input  logic [M-1:0]      u_a,
  input  logic [N-1:0]      u_b,
  output logic              u_out_valid,
  output logic [PW-1:0]     u_p,
  // signed inner-product array
  input  logic              s_in_valid,
  input  logic [M-1:0]      s_a,
  input  logic [N-1:0]      s_b,
  output logic              s_out_valid,
  output logic [PW-1:0]     s_p
);

  logic          prox_busy, prox_done, select_busy;
  logic [DW-1:0] blk_pd [NBLK];
  blk_in_t       blk_with_pb [NBLK];

  always_comb begin
    for (int i = 0; i < NBLK; i++) begin
      blk_pd[i]                = sel_blk[i].power_density;
      blk_with_pb[i]           = sel_blk[i];
      blk_with_pb[i].proximity = sel_pb[i];
    end
  end

  msv_proximity #(.NBLK(NBLK)) u_proximity (
    .clk,
    .rst_n,
    .start(sel_start),
    .geom (sel_geom),
    .pd   (blk_pd),
    .busy (prox_busy),
    .done (prox_done),
    .pb   (sel_pb)
  );

  msv_select #(.NBLK(NBLK)) u_select (
    .clk,
    .rst_n,
    .start     (prox_done),
    .blk       (blk_with_pb),
    .alpha     (sel_alpha),
    .beta      (sel_beta),
    .gamma     (sel_gamma),
    .act_thresh(sel_act_thresh),
    .t_crit    (sel_t_crit),
    .freq      (sel_freq),
    .eps_thresh(sel_eps_thresh),
    .ws_scale  (sel_ws_scale),
    .busy      (select_busy),
    .done      (sel_done),
    .res       (sel_res)
  );

  always_comb sel_busy = prox_busy || prox_done || select_busy;

  ip_array #(.M(M), .N(N), .L(L), .SIGNED_MODE(1'b0), .TREE(TREE)) u_unsigned (
    .clk, .rst_n,
    .in_valid (u_in_valid),
    .a        (u_a),
    .b        (u_b),
    .out_valid(u_out_valid),
    .p        (u_p)
  );

  ip_array #(.M(M), .N(N), .L(L), .SIGNED_MODE(1'b1), .TREE(TREE)) u_signed (
    .clk, .rst_n,
    .in_valid (s_in_valid),
    .a        (s_a),
    .b        (s_b),
    .out_valid(s_out_valid),
    .p        (s_p)
  );

endmodule
