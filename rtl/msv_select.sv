// msv_select: thermal-aware block selection and multiple-supply-voltage
// assignment engine.
//
// Given NBLK floorplan blocks it carries out the hardware-friendly steps of
// the thermal-aware placement method:
//  1. rate the blocks by the cost function of eq. (4) (msv_cost) and rank
//     them, rank 0 (R1) being the hottest; ties go to the lower index;
//  2. mark the blocks whose power density is above the mean plus one
//     standard deviation as hot (msv_hot_detect), to be placed along the
//     chip edge;
//  3-5. for every block whose switching activity exceeds `act_thresh`, start
//     at the lowest rail and check the delay model of eq. (6),
//       T = C_charge * V / (k * (V - Vt)^2) < t_crit,
//     evaluated as C_charge * V < t_crit * k * (V - Vt)^2; while it fails,
//     step the block up one rail (one cycle per attempt). Other blocks keep
//     the highest rail, where all blocks start;
//  6. report each block's power C_total * V^2 * f at its rail, eq. (7);
//  7. allot white space proportional to the thermal cost:
//     whitespace = cost * ws_scale (ws_scale is Q0.8);
//  8-9. flag soft blocks whose cost exceeds the thermal threshold
//     `eps_thresh` for enlargement.
// The geometric placement itself (positions, rotation, routing) is not done
// here.
//
// Interface: pulse `start` with the block table on `blk`; the table and the
// global inputs are latched. `busy` stays high until `done` pulses; `res`
// then holds the results until the next start. Timing: 1 cycle to latch, then
// per block 1 cycle plus 1 cycle per rail attempt for active blocks, i.e.
// at most 2 + 4*NBLK cycles from the start cycle to done. The steps, the
// eq. (4), (6), (7) models and the three rails follow the source; the rail
// voltages, the Q0.8 formats, the hot-block test via mean + standard
// deviation for edge placement, the white-space formula and the timing of
// the engine are this design's choices.
module msv_select
  import msv_pkg::*;
#(
  parameter int unsigned NBLK      = 10,    // blocks in the floorplan
  parameter int unsigned V_LOW_MV  = 1200,  // rail voltages, mV
  parameter int unsigned V_MED_MV  = 1500,
  parameter int unsigned V_HIGH_MV = 1800,
  parameter int unsigned VT_MV     = 450    // threshold voltage, mV
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  blk_in_t           blk [NBLK],
  input  logic [7:0]        alpha,
  input  logic [7:0]        beta,
  input  logic [7:0]        gamma,
  input  logic [7:0]        act_thresh,  // "high switching activity" above this
  input  logic [DW-1:0]     t_crit,      // critical timing
  input  logic [DW-1:0]     freq,        // clock frequency for eq. (7)
  input  logic [COST_W-1:0] eps_thresh,  // threshold heat value epsilon
  input  logic [7:0]        ws_scale,    // white space per unit cost, Q0.8
  output logic              busy,
  output logic              done,
  output blk_out_t          res [NBLK]
);

  localparam int unsigned IW = (NBLK > 1) ? $clog2(NBLK) : 1;

  typedef enum logic [1:0] {S_IDLE, S_BLOCK, S_CHECK, S_DONE} state_e;

  state_e            state;
  blk_in_t           blk_q [NBLK];
  logic [7:0]        alpha_q, beta_q, gamma_q, act_thresh_q, ws_scale_q;
  logic [DW-1:0]     t_crit_q, freq_q;
  logic [COST_W-1:0] eps_q;
  logic [IW-1:0]     idx;
  vlevel_e           level;

  logic [COST_W-1:0] cost [NBLK];
  logic [7:0]        rank [NBLK];
  logic              hot  [NBLK];

  // ---- step 1: cost and rank --------------------------------------------
  for (genvar g = 0; g < NBLK; g++) begin : g_cost
    msv_cost u_cost (
      .alpha        (alpha_q),
      .beta         (beta_q),
      .gamma        (gamma_q),
      .activity     (blk_q[g].activity),
      .power_density(blk_q[g].power_density),
      .proximity    (blk_q[g].proximity),
      .cost         (cost[g])
    );
  end

  always_comb begin
    for (int i = 0; i < NBLK; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NBLK; j++) begin
        if (cost[j] > cost[i] || (cost[j] == cost[i] && j < i)) rank[i] = rank[i] + 1'b1;
      end
    end
  end

  // ---- step 2: hot blocks (pd > mean + standard deviation) -----------------
  logic [DW-1:0] pd_q [NBLK];

  always_comb for (int i = 0; i < NBLK; i++) pd_q[i] = blk_q[i].power_density;

  msv_hot_detect #(.NBLK(NBLK)) u_hot (.pd(pd_q), .hot, .n_hot());

  // ---- steps 3-5: timing check of eq. (6) at the rail under test ------------
  function automatic logic [DW-1:0] rail_mv(input vlevel_e lv);
    case (lv)
      V_LOW:    return DW'(V_LOW_MV);
      V_MEDIUM: return DW'(V_MED_MV);
      default:  return DW'(V_HIGH_MV);
    endcase
  endfunction

  logic [DW-1:0] v_test, v_ov;
  logic [63:0]   t_lhs, t_rhs;
  logic          t_ok;
  logic          active;

  always_comb begin
    v_test = rail_mv(level);
    v_ov   = (v_test > DW'(VT_MV)) ? v_test - DW'(VT_MV) : '0;
    t_lhs  = 64'(blk_q[idx].c_charge) * 64'(v_test);
    t_rhs  = 64'(t_crit_q) * 64'(blk_q[idx].k_drive) * 64'(v_ov) * 64'(v_ov);
    t_ok   = t_lhs < t_rhs;
    active = blk_q[idx].activity > act_thresh_q;
  end

  // ---- step 6: power of eq. (7) at the chosen rail ---------------------------
  function automatic logic [POWER_W-1:0] block_power(input logic [DW-1:0] c_tot,
                                                     input logic [DW-1:0] v_mv,
                                                     input logic [DW-1:0] f);
    return POWER_W'(c_tot) * POWER_W'(v_mv) * POWER_W'(v_mv) * POWER_W'(f);
  endfunction

  // ---- sequencing -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      idx          <= '0;
      level        <= V_HIGH;
      done         <= 1'b0;
      alpha_q      <= '0;
      beta_q       <= '0;
      gamma_q      <= '0;
      act_thresh_q <= '0;
      ws_scale_q   <= '0;
      t_crit_q     <= '0;
      freq_q       <= '0;
      eps_q        <= '0;
      for (int i = 0; i < NBLK; i++) begin
        blk_q[i] <= '0;
        res[i]   <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            for (int i = 0; i < NBLK; i++) blk_q[i] <= blk[i];
            alpha_q      <= alpha;
            beta_q       <= beta;
            gamma_q      <= gamma;
            act_thresh_q <= act_thresh;
            ws_scale_q   <= ws_scale;
            t_crit_q     <= t_crit;
            freq_q       <= freq;
            eps_q        <= eps_thresh;
            idx          <= '0;
            state        <= S_BLOCK;
          end
        end
        S_BLOCK: begin
          // Per-block results that do not depend on the rail.
          res[idx].cost       <= cost[idx];
          res[idx].rank       <= rank[idx];
          res[idx].hot        <= hot[idx];
          res[idx].edge_place <= hot[idx];
          res[idx].whitespace <= (COST_W+8)'(cost[idx]) * (COST_W+8)'(ws_scale_q);
          res[idx].resize     <= blk_q[idx].is_soft && (cost[idx] > eps_q);
          if (active) begin
            level <= V_LOW;
            state <= S_CHECK;
          end else begin
            // Quiet blocks stay on the rail they all started on.
            res[idx].vlevel     <= V_HIGH;
            res[idx].timing_met <= t_ok_high(idx);
            res[idx].power      <= block_power(blk_q[idx].c_total, DW'(V_HIGH_MV), freq_q);
            state <= next_block_state();
            idx   <= next_idx();
          end
        end
        S_CHECK: begin
          if (t_ok || level == V_HIGH) begin
            res[idx].vlevel     <= level;
            res[idx].timing_met <= t_ok;
            res[idx].power      <= block_power(blk_q[idx].c_total, v_test, freq_q);
            state <= next_block_state();
            idx   <= next_idx();
          end else begin
            level <= vlevel_e'(level + 2'd1);
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

  function automatic state_e next_block_state();
    return (32'(idx) == NBLK - 1) ? S_DONE : S_BLOCK;
  endfunction

  function automatic logic [IW-1:0] next_idx();
    return (32'(idx) == NBLK - 1) ? '0 : idx + 1'b1;
  endfunction

  // Timing check of a quiet block at the highest rail.
  function automatic logic t_ok_high(input logic [IW-1:0] i);
    logic [63:0] lhs, rhs, ov;
    ov  = 64'(V_HIGH_MV - VT_MV);
    lhs = 64'(blk_q[i].c_charge) * 64'(V_HIGH_MV);
    rhs = 64'(t_crit_q) * 64'(blk_q[i].k_drive) * ov * ov;
    return lhs < rhs;
  endfunction

  always_comb busy = (state != S_IDLE);

endmodule
