// tb_msv_proximity: random placed floorplans of ten blocks. The reference
// finds the hot blocks with a floating-point mean and standard deviation,
// measures edge-to-edge gaps of the rectangles, and forms
// 256 * sum (p_i + p_j) / d^2 over the hot neighbours j of each block i,
// divided by the number of hot blocks. Results and the cycle count from
// start to done are checked; the floorplans include touching blocks.
module tb_msv_proximity;
  import msv_pkg::*;

  localparam int unsigned NBLK = 10;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  blk_geom_t     geom [NBLK];
  logic [DW-1:0] pd   [NBLK];
  logic          busy, done;
  logic [DW-1:0] pb   [NBLK];
  int            checks = 0, failures = 0, n_touch = 0, n_sat = 0;

  always #5 clk = ~clk;

  msv_proximity #(.NBLK(NBLK)) dut (.clk, .rst_n, .start, .geom, .pd, .busy, .done, .pb);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint gap(input longint a0, input longint al, input longint b0,
                                 input longint bl);
    longint lo, hi;
    lo = (a0 + al < b0 + bl) ? a0 + al : b0 + bl;
    hi = (a0 > b0) ? a0 : b0;
    return (hi > lo) ? hi - lo : 0;
  endfunction

  initial begin
    real    mean, sd;
    bit     hot [NBLK];
    int     n, cycles;
    longint acc, d2, e;
    rst_n = 1'b0; start = 1'b0;
    for (int i = 0; i < NBLK; i++) begin geom[i] = '0; pd[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < NBLK; i++) begin
        geom[i].x     = DW'($urandom_range(0, 400));
        geom[i].y     = DW'($urandom_range(0, 400));
        geom[i].w     = DW'($urandom_range(1, 60));
        geom[i].h     = DW'($urandom_range(1, 60));
        geom[i].power = DW'($urandom_range(0, (r % 4 == 0) ? 65535 : 3000));
        pd[i]         = DW'($urandom_range(100, 10000));
      end
      // two abutting blocks
      geom[1].x = geom[0].x + geom[0].w;
      geom[1].y = geom[0].y;
      mean = 0.0;
      for (int i = 0; i < NBLK; i++) mean += real'(pd[i]) / NBLK;
      sd = 0.0;
      for (int i = 0; i < NBLK; i++) sd += (real'(pd[i]) - mean) ** 2 / NBLK;
      sd = $sqrt(sd);
      n = 0;
      for (int i = 0; i < NBLK; i++) begin
        hot[i] = real'(pd[i]) > mean + sd;
        if (hot[i]) n++;
      end

      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != NBLK * (NBLK + 1) + 2) begin
        failures++;
        $display("took %0d cycles", cycles);
      end

      for (int i = 0; i < NBLK; i++) begin
        acc = 0;
        for (int j = 0; j < NBLK; j++) begin
          if (j == i || !hot[j]) continue;
          d2 = gap(geom[i].x, geom[i].w, geom[j].x, geom[j].w) ** 2
             + gap(geom[i].y, geom[i].h, geom[j].y, geom[j].h) ** 2;
          if (d2 == 0) begin
            d2 = 1;
            n_touch++;
          end
          acc += ((longint'(geom[i].power) + geom[j].power) * 256) / d2;
        end
        e = (n == 0) ? 0 : acc / n;
        if (e > 65535) begin
          e = 65535;
          n_sat++;
        end
        checks++;
        if (longint'(pb[i]) != e) begin
          failures++;
          $display("round %0d block %0d: P_B %0d expected %0d", r, i, pb[i], e);
        end
      end
    end
    checks++;
    if (n_touch == 0) begin
      failures++;
      $display("no touching hot neighbours were tested");
    end
    $display("touching pairs %0d, saturated results %0d", n_touch, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
