// tb_ip_pe: self-checking test of one processing element, in both the AND
// and the NAND flavour. Random operand bits, enables and vector starts are
// applied; a reference count is kept in the testbench and compared with the
// counter after every clock.
module tb_ip_pe;
  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         en, clr, a_bit, b_bit;
  logic [W-1:0] cnt_and, cnt_nand;
  int unsigned  ref_and, ref_nand;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  ip_pe #(.W(W), .INVERT(1'b0)) dut_and (
    .clk, .rst_n, .en, .clr, .a_bit, .b_bit, .count(cnt_and)
  );
  ip_pe #(.W(W), .INVERT(1'b1)) dut_nand (
    .clk, .rst_n, .en, .clr, .a_bit, .b_bit, .count(cnt_nand)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; a_bit = 1'b0; b_bit = 1'b0;
    ref_and = 0; ref_nand = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 9) != 0);
      clr   = ($urandom_range(0, 6) == 0);
      a_bit = 1'($urandom);
      b_bit = 1'($urandom);
      if (en) begin
        ref_and  = (clr ? 0 : ref_and)  + ((a_bit & b_bit) ? 1 : 0);
        ref_nand = (clr ? 0 : ref_nand) + ((a_bit & b_bit) ? 0 : 1);
        ref_and  = ref_and  % (1 << W);
        ref_nand = ref_nand % (1 << W);
      end
      @(posedge clk);
      #1;
      checks++;
      if (cnt_and != W'(ref_and)) begin
        failures++;
        $display("AND count %0d, expected %0d", cnt_and, ref_and);
      end
      checks++;
      if (cnt_nand != W'(ref_nand)) begin
        failures++;
        $display("NAND count %0d, expected %0d", cnt_nand, ref_nand);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
