// msv_proximity: proximity factor of eq. (5) for every block of a placed
// floorplan.
//
// The method scores how strongly hot blocks heat each other with
//   P_B = (1/n) * sum (p_i + p_j) / d_ij^2,
// where p is a block's power dissipation, d_ij the Euclidean distance
// between the edges of blocks i and j, and n the number of hot blocks
// (power density above mean plus one standard deviation, msv_hot_detect).
// Here the factor is given per block i, summing over the hot blocks j != i:
//   P_B(i) = 256 * sum_{j hot, j != i} (p_i + p_j) / d_ij^2 / n,
// i.e. in units of 1/256, saturated to DW bits. The edge distance of two
// rectangles uses the gaps dx = max(0, gap along x) and dy likewise,
// d^2 = dx^2 + dy^2; blocks that touch or overlap count as d^2 = 1.
//
// Interface: pulse `start` with the geometry and power densities applied;
// they are latched. One (i,j) pair is evaluated per cycle with a
// combinational divider; `done` is high NBLK*(NBLK+1) + 2 cycles after the
// start cycle, and
// `pb` holds the results until the next start. The formula and the hot-block
// count follow the source; the per-block form, the edge-distance rule for
// touching blocks, the 1/256 scaling and the timing are this design's
// choices.
module msv_proximity
  import msv_pkg::*;
#(
  parameter int unsigned NBLK = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  blk_geom_t     geom [NBLK],
  input  logic [DW-1:0] pd   [NBLK],
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] pb   [NBLK]
);

  localparam int unsigned IW = (NBLK > 1) ? $clog2(NBLK) : 1;
  localparam int unsigned NW = $clog2(NBLK + 1);
  localparam int unsigned AW = 2 * DW + 8 + NW;  // accumulator width

  typedef enum logic [1:0] {S_IDLE, S_PAIR, S_NORM, S_DONE} state_e;

  state_e            state;
  blk_geom_t         g_q  [NBLK];
  logic [DW-1:0]     pd_q [NBLK];
  logic [IW-1:0]     bi, bj;
  logic [AW-1:0]     acc;
  logic              hot  [NBLK];
  logic [NW-1:0]     n_hot;

  msv_hot_detect #(.NBLK(NBLK)) u_hot (.pd(pd_q), .hot, .n_hot);

  // Edge-to-edge squared distance and the pair term for (bi, bj).
  logic [DW:0]     lo_x, hi_x, lo_y, hi_y, dx, dy;
  logic [2*DW+2:0] d2;
  logic [AW-1:0]   term;

  always_comb begin
    blk_geom_t a, b;
    a = g_q[bi];
    b = g_q[bj];
    // gap along x: start of the right-hand block minus end of the left one
    lo_x = ((DW+1)'(a.x) + (DW+1)'(a.w) < (DW+1)'(b.x) + (DW+1)'(b.w))
           ? (DW+1)'(a.x) + (DW+1)'(a.w) : (DW+1)'(b.x) + (DW+1)'(b.w);
    hi_x = (a.x > b.x) ? (DW+1)'(a.x) : (DW+1)'(b.x);
    lo_y = ((DW+1)'(a.y) + (DW+1)'(a.h) < (DW+1)'(b.y) + (DW+1)'(b.h))
           ? (DW+1)'(a.y) + (DW+1)'(a.h) : (DW+1)'(b.y) + (DW+1)'(b.h);
    hi_y = (a.y > b.y) ? (DW+1)'(a.y) : (DW+1)'(b.y);
    dx   = (hi_x > lo_x) ? hi_x - lo_x : '0;
    dy   = (hi_y > lo_y) ? hi_y - lo_y : '0;
    d2   = (2*DW+3)'(dx) * (2*DW+3)'(dx) + (2*DW+3)'(dy) * (2*DW+3)'(dy);
    if (d2 == '0) d2 = (2*DW+3)'(1);
    term = ((AW'(a.power) + AW'(b.power)) << 8) / AW'(d2);
  end

  logic [AW-1:0] norm;

  always_comb norm = (n_hot == '0) ? '0 : acc / AW'(n_hot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bi    <= '0;
      bj    <= '0;
      acc   <= '0;
      done  <= 1'b0;
      for (int i = 0; i < NBLK; i++) begin
        g_q[i]  <= '0;
        pd_q[i] <= '0;
        pb[i]   <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            for (int i = 0; i < NBLK; i++) begin
              g_q[i]  <= geom[i];
              pd_q[i] <= pd[i];
            end
            bi    <= '0;
            bj    <= '0;
            acc   <= '0;
            state <= S_PAIR;
          end
        end
        S_PAIR: begin
          if (bi != bj && hot[bj]) acc <= acc + term;
          if (32'(bj) == NBLK - 1) state <= S_NORM;
          else                     bj    <= bj + 1'b1;
        end
        S_NORM: begin
          pb[bi] <= (norm > AW'({DW{1'b1}})) ? '1 : DW'(norm);
          acc    <= '0;
          bj     <= '0;
          if (32'(bi) == NBLK - 1) begin
            bi    <= '0;
            state <= S_DONE;
          end else begin
            bi    <= bi + 1'b1;
            state <= S_PAIR;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb busy = (state != S_IDLE);

endmodule
