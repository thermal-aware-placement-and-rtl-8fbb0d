// tb_ip_ctrl: checks the L-cycle sequencing: `clr` on the first element of
// every vector, `phase` counting accepted elements only, and `load` exactly
// one cycle after the L-th element (the clock2 rate, one load per L
// elements).
module tb_ip_ctrl;
  localparam int unsigned L = 7;

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic                   in_valid;
  logic                   clr, load;
  logic [$clog2(L+1)-1:0] phase;
  int                     checks = 0, failures = 0;
  int unsigned            k, loads, elems;
  logic                   exp_load;

  always #5 clk = ~clk;

  ip_ctrl #(.L(L)) dut (.clk, .rst_n, .in_valid, .clr, .load, .phase);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; k = 0; loads = 0; elems = 0; exp_load = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      checks++;
      if (phase != $bits(phase)'(k) || clr != (k == 0)) begin
        failures++;
        $display("phase %0d clr %0d, expected phase %0d", phase, clr, k);
      end
      checks++;
      if (load != exp_load) begin
        failures++;
        $display("load %0d, expected %0d at t=%0d", load, exp_load, t);
      end
      if (load) loads++;
      exp_load = in_valid && (k == L - 1);
      if (in_valid) begin
        elems++;
        k = (k == L - 1) ? 0 : k + 1;
      end
      @(posedge clk);
    end
    @(negedge clk);
    if (load) loads++;
    checks++;
    if (loads != elems / L) begin
      failures++;
      $display("loads %0d for %0d elements", loads, elems);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
