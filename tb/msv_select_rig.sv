// msv_select_rig: test rig for the block selection engine at any floorplan
// size. It instantiates msv_select with NBLK blocks, runs ROUNDS random
// floorplans (power densities, activities, capacitances, soft flags) through
// it and compares every result with a floating-point reference (mean and
// standard deviation with $sqrt, delay of T = C*V/(k*(V-Vt)^2) by
// division), including the number of cycles from start to done. It reports
// its counts on `checks`/`failures` and raises `finished` at the end.
module msv_select_rig
  import msv_pkg::*;
#(
  parameter int unsigned NBLK   = 33,
  parameter int unsigned ROUNDS = 10
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam real V_MV [3] = '{1200.0, 1500.0, 1800.0};
  localparam real VT = 450.0;

  logic              start;
  blk_in_t           blk [NBLK];
  logic [7:0]        alpha, beta, gamma, act_thresh, ws_scale;
  logic [DW-1:0]     t_crit, freq;
  logic [COST_W-1:0] eps_thresh;
  logic              busy, done;
  blk_out_t          res [NBLK];

  msv_select #(.NBLK(NBLK)) dut (
    .clk, .rst_n, .start, .blk, .alpha, .beta, .gamma, .act_thresh, .t_crit,
    .freq, .eps_thresh, .ws_scale, .busy, .done, .res
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("[%0d blocks] %s", NBLK, what);
    end
  endtask

  function automatic real delay(input int unsigned i, input int lv);
    return real'(blk[i].c_charge) * V_MV[lv] /
           (real'(blk[i].k_drive) * (V_MV[lv] - VT) * (V_MV[lv] - VT));
  endfunction

  initial begin
    longint cost [NBLK];
    real    mean, sd;
    int     lv, rnk, cycles, exp_cycles;
    bit     met, hot, active;
    checks = 0; failures = 0; finished = 1'b0; start = 1'b0;
    for (int i = 0; i < NBLK; i++) blk[i] = '0;
    alpha = '0; beta = '0; gamma = '0; act_thresh = '0; ws_scale = '0;
    t_crit = '0; freq = '0; eps_thresh = '0;
    wait (rst_n);
    for (int r = 0; r < ROUNDS; r++) begin
      @(negedge clk);
      for (int i = 0; i < NBLK; i++) begin
        blk[i].power_density = DW'($urandom_range(500, 12000));
        blk[i].activity      = 8'($urandom);
        blk[i].proximity     = DW'($urandom_range(0, 2000));
        blk[i].c_charge      = DW'($urandom_range(1000, 65535));
        blk[i].k_drive       = DW'($urandom_range(1, 3));
        blk[i].c_total       = DW'($urandom);
        blk[i].is_soft       = ($urandom_range(0, 2) == 0);
      end
      alpha = 8'($urandom_range(1, 255)); beta = 8'($urandom_range(1, 255));
      gamma = 8'($urandom_range(1, 255)); act_thresh = 8'($urandom);
      t_crit = DW'($urandom_range(30, 150)); freq = DW'($urandom);
      eps_thresh = COST_W'($urandom_range(500, 6000)); ws_scale = 8'($urandom);

      mean = 0.0;
      exp_cycles = 2;
      for (int i = 0; i < NBLK; i++) begin
        cost[i] = (longint'(alpha) * blk[i].activity + longint'(beta) * blk[i].power_density
                   + longint'(gamma) * blk[i].proximity) / 256;
        mean += real'(blk[i].power_density) / NBLK;
        if (blk[i].activity > act_thresh) begin
          lv = 0;
          while (lv < 2 && !(delay(i, lv) < real'(t_crit))) lv++;
          exp_cycles += 2 + lv;
        end else begin
          exp_cycles += 1;
        end
      end
      sd = 0.0;
      for (int i = 0; i < NBLK; i++) sd += (real'(blk[i].power_density) - mean) ** 2 / NBLK;
      sd = $sqrt(sd);

      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      check(cycles == exp_cycles, $sformatf("took %0d cycles, expected %0d", cycles, exp_cycles));

      for (int i = 0; i < NBLK; i++) begin
        rnk = 0;
        for (int j = 0; j < NBLK; j++) if (cost[j] > cost[i] || (cost[j] == cost[i] && j < i)) rnk++;
        hot    = real'(blk[i].power_density) > mean + sd;
        active = blk[i].activity > act_thresh;
        lv     = active ? 0 : 2;
        while (active && lv < 2 && !(delay(i, lv) < real'(t_crit))) lv++;
        met = delay(i, lv) < real'(t_crit);
        check(longint'(res[i].cost) == cost[i] && int'(res[i].rank) == rnk,
              $sformatf("block %0d cost/rank", i));
        check(res[i].hot == hot && res[i].edge_place == hot, $sformatf("block %0d hot", i));
        check(int'(res[i].vlevel) == lv && res[i].timing_met == met, $sformatf("block %0d rail", i));
        check(res[i].power == POWER_W'(longint'(blk[i].c_total) * longint'(V_MV[lv])
                                       * longint'(V_MV[lv]) * longint'(freq)),
              $sformatf("block %0d power", i));
        check(longint'(res[i].whitespace) == cost[i] * ws_scale
              && res[i].resize == (blk[i].is_soft && cost[i] > eps_thresh),
              $sformatf("block %0d whitespace/resize", i));
      end
    end
    finished = 1'b1;
  end
endmodule
