// tb_thermal_msv_top: end-to-end test of the whole design at its default
// parameters (4x4 operands, L = 7, Dadda trees, ten floorplan blocks).
//
// Selection engine: a ten-block placed floorplan first gets its proximity
// factors computed, then is rated and assigned rails, twice (normal and
// tight critical timing); proximity factors, rank, hot/edge flag, rail, timing,
// power, white space and resize flags are compared with a floating-point
// reference. Inner-product arrays: the unsigned and the signed array each
// get a stream of random vectors, with idle cycles inside vectors and vectors
// back to back, and every result is compared with sum A_k*B_k and must
// appear 2 cycles after the vector's last element.
//
// Each mechanism must occur at least once: a nonzero proximity factor, every rail, a step-up after a
// failed timing check, a timing miss on the highest rail, a hot block, a
// resized soft block, an idle cycle inside a vector, back-to-back vectors, a
// negative signed result and a full-scale unsigned result.
module tb_thermal_msv_top;
  import ip_pkg::*;
  import msv_pkg::*;

  localparam int unsigned M = 4, N = 4, L = 7, NBLK = 10;
  localparam int unsigned PW = prod_width(M, N, L);
  localparam real V_MV [3] = '{1200.0, 1500.0, 1800.0};
  localparam real VT = 450.0;
  localparam int unsigned NVEC = 300;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              sel_start;
  blk_in_t           sel_blk [NBLK];
  blk_geom_t         sel_geom [NBLK];
  logic [DW-1:0]     sel_pb [NBLK];
  logic [7:0]        sel_alpha, sel_beta, sel_gamma, sel_act_thresh, sel_ws_scale;
  logic [DW-1:0]     sel_t_crit, sel_freq;
  logic [COST_W-1:0] sel_eps_thresh;
  logic              sel_busy, sel_done;
  blk_out_t          sel_res [NBLK];
  logic              u_in_valid, s_in_valid, u_out_valid, s_out_valid;
  logic [M-1:0]      u_a, s_a;
  logic [N-1:0]      u_b, s_b;
  logic [PW-1:0]     u_p, s_p;

  int checks = 0, failures = 0;
  int n_level [3];
  int n_stepped = 0, n_miss = 0, n_hot = 0, n_resize = 0;
  int n_prox = 0;
  int n_gap = 0, n_b2b = 0, n_neg = 0, n_full = 0;

  always #5 clk = ~clk;

  thermal_msv_top dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  // ---------------- selection engine ----------------
  function automatic real delay(input int unsigned i, input int lv);
    return real'(sel_blk[i].c_charge) * V_MV[lv] /
           (real'(sel_blk[i].k_drive) * (V_MV[lv] - VT) * (V_MV[lv] - VT));
  endfunction

  function automatic longint gap(input longint a0, input longint al, input longint b0,
                                 input longint bl);
    longint lo, hi;
    lo = (a0 + al < b0 + bl) ? a0 + al : b0 + bl;
    hi = (a0 > b0) ? a0 : b0;
    return (hi > lo) ? hi - lo : 0;
  endfunction

  task automatic run_select();
    longint cost [NBLK];
    longint pbx [NBLK];
    real    mean, sd;
    int     lv, rnk, nh;
    bit     met, hot, active;
    bit     hotv [NBLK];
    mean = 0.0;
    for (int i = 0; i < NBLK; i++) mean += real'(sel_blk[i].power_density) / NBLK;
    sd = 0.0;
    for (int i = 0; i < NBLK; i++) sd += (real'(sel_blk[i].power_density) - mean) ** 2 / NBLK;
    sd = $sqrt(sd);
    nh = 0;
    for (int i = 0; i < NBLK; i++) begin
      hotv[i] = real'(sel_blk[i].power_density) > mean + sd;
      if (hotv[i]) nh++;
    end
    // proximity factor, eq. (5), per block over its hot neighbours
    for (int i = 0; i < NBLK; i++) begin
      longint acc, d2;
      acc = 0;
      for (int j = 0; j < NBLK; j++) begin
        if (j == i || !hotv[j]) continue;
        d2 = gap(sel_geom[i].x, sel_geom[i].w, sel_geom[j].x, sel_geom[j].w) ** 2
           + gap(sel_geom[i].y, sel_geom[i].h, sel_geom[j].y, sel_geom[j].h) ** 2;
        if (d2 == 0) d2 = 1;
        acc += ((longint'(sel_geom[i].power) + sel_geom[j].power) * 256) / d2;
      end
      pbx[i] = (nh == 0) ? 0 : acc / nh;
      if (pbx[i] > 65535) pbx[i] = 65535;
      if (pbx[i] > 0) n_prox++;
    end
    for (int i = 0; i < NBLK; i++)
      cost[i] = (longint'(sel_alpha) * sel_blk[i].activity
                 + longint'(sel_beta) * sel_blk[i].power_density
                 + longint'(sel_gamma) * pbx[i]) / 256;
    @(negedge clk) sel_start = 1'b1;
    @(negedge clk) sel_start = 1'b0;
    while (!sel_done) @(negedge clk);
    for (int i = 0; i < NBLK; i++)
      check(longint'(sel_pb[i]) == pbx[i],
            $sformatf("block %0d P_B %0d expected %0d", i, sel_pb[i], pbx[i]));
    for (int i = 0; i < NBLK; i++) begin
      rnk = 0;
      for (int j = 0; j < NBLK; j++) if (cost[j] > cost[i] || (cost[j] == cost[i] && j < i)) rnk++;
      hot    = real'(sel_blk[i].power_density) > mean + sd;
      active = sel_blk[i].activity > sel_act_thresh;
      lv     = active ? 0 : 2;
      while (active && lv < 2 && !(delay(i, lv) < real'(sel_t_crit))) lv++;
      met = delay(i, lv) < real'(sel_t_crit);
      check(longint'(sel_res[i].cost) == cost[i] && int'(sel_res[i].rank) == rnk,
            $sformatf("block %0d cost/rank %0d/%0d expected %0d/%0d",
                      i, sel_res[i].cost, sel_res[i].rank, cost[i], rnk));
      check(sel_res[i].hot == hot && sel_res[i].edge_place == hot,
            $sformatf("block %0d hot %0d expected %0d", i, sel_res[i].hot, hot));
      check(int'(sel_res[i].vlevel) == lv && sel_res[i].timing_met == met,
            $sformatf("block %0d rail %0d/%0d expected %0d/%0d",
                      i, sel_res[i].vlevel, sel_res[i].timing_met, lv, met));
      check(sel_res[i].power == POWER_W'(longint'(sel_blk[i].c_total) * longint'(V_MV[lv])
                                         * longint'(V_MV[lv]) * longint'(sel_freq)),
            $sformatf("block %0d power", i));
      check(longint'(sel_res[i].whitespace) == cost[i] * sel_ws_scale
            && sel_res[i].resize == (sel_blk[i].is_soft && cost[i] > sel_eps_thresh),
            $sformatf("block %0d whitespace/resize", i));
      n_level[lv]++;
      if (active && lv > 0) n_stepped++;
      if (!met) n_miss++;
      if (hot) n_hot++;
      if (sel_res[i].resize) n_resize++;
    end
  endtask

  initial begin
    n_level = '{0, 0, 0};
    sel_start = 1'b0;
    sel_alpha = 8'd96; sel_beta = 8'd160; sel_gamma = 8'd64; sel_act_thresh = 8'd128;
    sel_t_crit = 16'd80; sel_freq = 16'd100; sel_eps_thresh = 18'd1000; sel_ws_scale = 8'd32;
    //                  pd      act     prox     c_charge   k       c_total  soft
    sel_blk[0] = '{16'd9000, 8'd200, 16'd500, 16'd20000, 16'd1, 16'd300, 1'b0};
    sel_blk[1] = '{16'd1500, 8'd220, 16'd300, 16'd50000, 16'd1, 16'd200, 1'b0};
    sel_blk[2] = '{16'd1800, 8'd250, 16'd900, 16'd65000, 16'd1, 16'd250, 1'b0};
    sel_blk[3] = '{16'd1200, 8'd180, 16'd100, 16'd40000, 16'd2, 16'd150, 1'b1};
    sel_blk[4] = '{16'd1000, 8'd40,  16'd200, 16'd30000, 16'd1, 16'd100, 1'b0};
    sel_blk[5] = '{16'd2000, 8'd60,  16'd700, 16'd25000, 16'd1, 16'd120, 1'b1};
    sel_blk[6] = '{16'd1300, 8'd10,  16'd50,  16'd10000, 16'd3, 16'd90,  1'b0};
    sel_blk[7] = '{16'd1100, 8'd130, 16'd80,  16'd45000, 16'd1, 16'd110, 1'b1};
    sel_blk[8] = '{16'd1700, 8'd100, 16'd400, 16'd15000, 16'd1, 16'd130, 1'b0};
    sel_blk[9] = '{16'd1400, 8'd240, 16'd250, 16'd60000, 16'd1, 16'd140, 1'b0};
    // placed rectangles: a 4 x 3 grid of 40 x 30 cells, 10 units apart,
    // except that block 1 abuts block 0 (the hot one)
    for (int i = 0; i < NBLK; i++) begin
      sel_geom[i].x     = DW'((i % 4) * 50);
      sel_geom[i].y     = DW'((i / 4) * 40);
      sel_geom[i].w     = 16'd40;
      sel_geom[i].h     = 16'd30;
      sel_geom[i].power = DW'(100 + 37 * i);
    end
    sel_geom[1].x = 16'd40;
    wait (rst_n);
    run_select();
    sel_t_crit = 16'd55;
    run_select();
    sel_done_all = 1'b1;
  end

  // ---------------- inner-product arrays ----------------
  longint      exp_u [$], exp_s [$];
  int unsigned due_u [$], due_s [$];
  int unsigned cycle = 0;
  int unsigned res_u = 0, res_s = 0;
  bit          sel_done_all = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    bit due_now;
    due_now = due_u.size() > 0 && due_u[0] == cycle;
    if (u_out_valid || due_now) begin
      check(u_out_valid && due_now, $sformatf("cycle %0d: unsigned result timing", cycle));
      if (due_now) begin
        longint e;
        e = exp_u.pop_front();
        void'(due_u.pop_front());
        res_u++;
        check(u_p == PW'(e), $sformatf("unsigned result %0d expected %0d", u_p, e));
        if (e == longint'(L) * 225) n_full++;
      end
    end
    due_now = due_s.size() > 0 && due_s[0] == cycle;
    if (s_out_valid || due_now) begin
      check(s_out_valid && due_now, $sformatf("cycle %0d: signed result timing", cycle));
      if (due_now) begin
        longint e;
        e = exp_s.pop_front();
        void'(due_s.pop_front());
        res_s++;
        check($signed(s_p) == PW'(e), $sformatf("signed result %0d expected %0d", $signed(s_p), e));
        if (e < 0) n_neg++;
      end
    end
  end

  // Drives one array: `sgn` selects the signed port set.
  task automatic drive(input bit sgn);
    longint acc = 0;
    int     k = 0, v = 0;
    bit     prev_last = 1'b0;
    logic [M-1:0] a;
    logic [N-1:0] b;
    bit     valid;
    while (v < NVEC) begin
      @(negedge clk);
      valid = (v % 3 == 1) ? ($urandom_range(0, 2) != 0) : 1'b1;
      a = M'($urandom);
      b = N'($urandom);
      if (v == 5 && !sgn) begin a = '1; b = '1; end
      if (sgn) begin s_in_valid = valid; s_a = a; s_b = b; end
      else     begin u_in_valid = valid; u_a = a; u_b = b; end
      if (!valid && k > 0) n_gap++;
      if (valid) begin
        if (k == 0 && prev_last) n_b2b++;
        acc += sgn ? longint'($signed(a)) * longint'($signed(b)) : longint'(a) * longint'(b);
        k++;
        if (k == L) begin
          if (sgn) begin exp_s.push_back(acc); due_s.push_back(cycle + 2); end
          else     begin exp_u.push_back(acc); due_u.push_back(cycle + 2); end
          acc = 0; k = 0; v++;
        end
      end
      prev_last = valid && (k == 0);
    end
    @(negedge clk);
    if (sgn) s_in_valid = 1'b0; else u_in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    u_in_valid = 1'b0; s_in_valid = 1'b0; u_a = '0; u_b = '0; s_a = '0; s_b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      drive(1'b0);
      drive(1'b1);
    join
    repeat (4) @(negedge clk);
    wait (sel_done_all);
    check(res_u == NVEC && res_s == NVEC, $sformatf("results %0d/%0d of %0d", res_u, res_s, NVEC));
    check(n_level[0] > 0 && n_level[1] > 0 && n_level[2] > 0, "not every rail used");
    check(n_stepped > 0, "no rail step-up");
    check(n_miss > 0, "no timing miss on the highest rail");
    check(n_hot > 0, "no hot block");
    check(n_resize > 0, "no soft block resized");
    check(n_prox > 0, "no nonzero proximity factor");
    check(n_gap > 0, "no idle cycle inside a vector");
    check(n_b2b > 0, "no back-to-back vectors");
    check(n_neg > 0, "no negative signed result");
    check(n_full > 0, "no full-scale unsigned result");
    $display("rails %0d/%0d/%0d stepped %0d missed %0d hot %0d resized %0d gaps %0d b2b %0d neg %0d full %0d",
             n_level[0], n_level[1], n_level[2], n_stepped, n_miss, n_hot, n_resize,
             n_gap, n_b2b, n_neg, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
