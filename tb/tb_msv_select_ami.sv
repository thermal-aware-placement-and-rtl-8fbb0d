// tb_msv_select_ami: the block selection engine at the sizes of the two
// floorplanning benchmarks, ami33 (33 blocks) and ami49 (49 blocks). The
// benchmark block data are not used; each size runs random floorplans
// through msv_select_rig, which checks every result against a reference.
module tb_msv_select_ami;
  logic clk = 1'b0;
  logic rst_n;
  int   c33, f33, c49, f49;
  logic d33, d49;

  always #5 clk = ~clk;

  msv_select_rig #(.NBLK(33), .ROUNDS(20)) u_ami33 (
    .clk, .rst_n, .checks(c33), .failures(f33), .finished(d33)
  );
  msv_select_rig #(.NBLK(49), .ROUNDS(20)) u_ami49 (
    .clk, .rst_n, .checks(c49), .failures(f49), .finished(d49)
  );

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c33 + c49, f33 + f49 + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (d33 && d49);
    $display("TB_RESULT checks=%0d failures=%0d", c33 + c49, f33 + f49);
    $finish;
  end
endmodule
