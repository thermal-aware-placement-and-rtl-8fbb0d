// tb_ip_pipe_reg: the pipeline register must take `d` only on `load`, hold
// it otherwise, and pulse `valid` in the cycle after each load.
module tb_ip_pipe_reg;
  localparam int unsigned WIDTH = 48;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             load;
  logic [WIDTH-1:0] d, q, ref_q;
  logic             valid, ref_valid;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  ip_pipe_reg #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .load, .d, .q, .valid);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; d = '0; ref_q = '0; ref_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load = ($urandom_range(0, 6) == 0);
      d    = {$urandom, $urandom};
      if (load) ref_q = d;
      ref_valid = load;
      @(posedge clk);
      #1;
      checks++;
      if (q != ref_q || valid != ref_valid) begin
        failures++;
        $display("q %h valid %0d, expected %h %0d", q, valid, ref_q, ref_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
