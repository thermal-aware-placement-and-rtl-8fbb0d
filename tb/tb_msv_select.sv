// tb_msv_select: runs the block selection engine on a hand-made floorplan
// of ten blocks and on random ones, and compares every result field with a
// reference computed here in floating point (mean and standard deviation
// with $sqrt, the delay T = C*V / (k*(V-Vt)^2) by division). It also checks
// the number of cycles from start to done, and that each mechanism occurs at
// least once: a block on each of the three rails, a block stepped up after a
// failed timing check, a block that misses timing even on the highest rail,
// a hot block and a resized soft block.
module tb_msv_select;
  import msv_pkg::*;

  localparam int unsigned NBLK = 10;
  localparam real V_MV [3] = '{1200.0, 1500.0, 1800.0};
  localparam real VT = 450.0;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              start;
  blk_in_t           blk [NBLK];
  logic [7:0]        alpha, beta, gamma, act_thresh, ws_scale;
  logic [DW-1:0]     t_crit, freq;
  logic [COST_W-1:0] eps_thresh;
  logic              busy, done;
  blk_out_t          res [NBLK];
  int                checks = 0, failures = 0;
  int                n_level [3];
  int                n_stepped = 0, n_miss = 0, n_hot = 0, n_resize = 0;

  always #5 clk = ~clk;

  msv_select #(.NBLK(NBLK)) dut (
    .clk, .rst_n, .start, .blk, .alpha, .beta, .gamma, .act_thresh, .t_crit,
    .freq, .eps_thresh, .ws_scale, .busy, .done, .res
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  function automatic real delay(input int unsigned i, input int lv);
    return real'(blk[i].c_charge) * V_MV[lv] /
           (real'(blk[i].k_drive) * (V_MV[lv] - VT) * (V_MV[lv] - VT));
  endfunction

  task automatic run_and_check();
    longint cost [NBLK];
    real    mean, sd;
    int     exp_cycles, cycles, lv, rnk;
    bit     met;
    // reference cost, expected cycle count
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
    for (int i = 0; i < NBLK; i++)
      sd += (real'(blk[i].power_density) - mean) ** 2 / NBLK;
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
      bit hot;
      check(longint'(res[i].cost) == cost[i],
            $sformatf("block %0d cost %0d expected %0d", i, res[i].cost, cost[i]));
      rnk = 0;
      for (int j = 0; j < NBLK; j++)
        if (cost[j] > cost[i] || (cost[j] == cost[i] && j < i)) rnk++;
      check(int'(res[i].rank) == rnk,
            $sformatf("block %0d rank %0d expected %0d", i, res[i].rank, rnk));
      hot = real'(blk[i].power_density) > mean + sd;
      check(res[i].hot == hot && res[i].edge_place == hot,
            $sformatf("block %0d hot %0d expected %0d", i, res[i].hot, hot));
      if (blk[i].activity > act_thresh) begin
        lv = 0;
        while (lv < 2 && !(delay(i, lv) < real'(t_crit))) lv++;
      end else begin
        lv = 2;
      end
      met = delay(i, lv) < real'(t_crit);
      check(int'(res[i].vlevel) == lv && res[i].timing_met == met,
            $sformatf("block %0d rail %0d met %0d expected %0d %0d",
                      i, res[i].vlevel, res[i].timing_met, lv, met));
      check(res[i].power == POWER_W'(longint'(blk[i].c_total) * longint'(V_MV[lv])
                                     * longint'(V_MV[lv]) * longint'(freq)),
            $sformatf("block %0d power %0d", i, res[i].power));
      check(longint'(res[i].whitespace) == cost[i] * ws_scale,
            $sformatf("block %0d whitespace %0d", i, res[i].whitespace));
      check(res[i].resize == (blk[i].is_soft && cost[i] > eps_thresh),
            $sformatf("block %0d resize %0d", i, res[i].resize));
      n_level[lv]++;
      if (blk[i].activity > act_thresh && lv > 0) n_stepped++;
      if (!met) n_miss++;
      if (hot) n_hot++;
      if (res[i].resize) n_resize++;
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    n_level = '{0, 0, 0};
    for (int i = 0; i < NBLK; i++) blk[i] = '0;
    alpha = 8'd96; beta = 8'd160; gamma = 8'd64; act_thresh = 8'd128;
    t_crit = 16'd80; freq = 16'd100; eps_thresh = 18'd3000; ws_scale = 8'd32;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Hand-made floorplan: one very hot block, high-activity blocks that
    // land on each rail, one that misses timing, three soft blocks.
    //              pd     act  prox  c_charge k  c_total soft
    blk[0] = '{16'd9000, 8'd200, 16'd500, 16'd20000, 16'd1, 16'd300, 1'b0}; // low rail
    blk[1] = '{16'd1500, 8'd220, 16'd300, 16'd50000, 16'd1, 16'd200, 1'b0}; // medium
    blk[2] = '{16'd1800, 8'd250, 16'd900, 16'd65000, 16'd1, 16'd250, 1'b0}; // high, met? no
    blk[3] = '{16'd1200, 8'd180, 16'd100, 16'd40000, 16'd2, 16'd150, 1'b1}; // low rail, soft
    blk[4] = '{16'd1000, 8'd40,  16'd200, 16'd30000, 16'd1, 16'd100, 1'b0}; // quiet
    blk[5] = '{16'd2000, 8'd60,  16'd700, 16'd25000, 16'd1, 16'd120, 1'b1}; // quiet, soft
    blk[6] = '{16'd1300, 8'd10,  16'd50,  16'd10000, 16'd3, 16'd90,  1'b0};
    blk[7] = '{16'd1100, 8'd130, 16'd80,  16'd45000, 16'd1, 16'd110, 1'b1};
    blk[8] = '{16'd1700, 8'd100, 16'd400, 16'd15000, 16'd1, 16'd130, 1'b0};
    blk[9] = '{16'd1400, 8'd240, 16'd250, 16'd60000, 16'd1, 16'd140, 1'b0};
    run_and_check();
    // Tight critical timing: some blocks cannot meet it on any rail.
    t_crit = 16'd55;
    run_and_check();

    for (int r = 0; r < 40; r++) begin
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
      run_and_check();
    end

    check(n_level[0] > 0 && n_level[1] > 0 && n_level[2] > 0,
          $sformatf("rails used: low %0d medium %0d high %0d", n_level[0], n_level[1], n_level[2]));
    check(n_stepped > 0, "no block was stepped up after a failed timing check");
    check(n_miss > 0, "no block missed timing on the highest rail");
    check(n_hot > 0, "no hot block");
    check(n_resize > 0, "no soft block resized");
    $display("rails low/medium/high %0d/%0d/%0d, stepped %0d, missed %0d, hot %0d, resized %0d",
             n_level[0], n_level[1], n_level[2], n_stepped, n_miss, n_hot, n_resize);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
