// tb_ip_reduction_tree: compares the Dadda and the Wallace tree with the
// arithmetic sum of the weighted counter words, sum count(i,j) * 2^(i+j)
// modulo 2^PW, for random counts, for the 4x4, L=7 case study size and for a
// larger 6x5, L=12 array.
module tb_ip_reduction_tree;
  import ip_pkg::*;

  localparam int unsigned M0 = 4, N0 = 4, L0 = 7;
  localparam int unsigned W0 = cnt_width(L0), PW0 = prod_width(M0, N0, L0);
  localparam int unsigned M1 = 6, N1 = 5, L1 = 12;
  localparam int unsigned W1 = cnt_width(L1), PW1 = prod_width(M1, N1, L1);

  logic [M0*N0*W0-1:0] c0;
  logic [M1*N1*W1-1:0] c1;
  logic [PW0-1:0]      s0_dadda, s0_wallace;
  logic [PW1-1:0]      s1_dadda, s1_wallace;
  int                  checks = 0, failures = 0;

  ip_reduction_tree #(.M(M0), .N(N0), .L(L0), .TREE(TREE_DADDA))   d0 (.counts(c0), .sum(s0_dadda));
  ip_reduction_tree #(.M(M0), .N(N0), .L(L0), .TREE(TREE_WALLACE)) w0 (.counts(c0), .sum(s0_wallace));
  ip_reduction_tree #(.M(M1), .N(N1), .L(L1), .TREE(TREE_DADDA))   d1 (.counts(c1), .sum(s1_dadda));
  ip_reduction_tree #(.M(M1), .N(N1), .L(L1), .TREE(TREE_WALLACE)) w1 (.counts(c1), .sum(s1_wallace));

  function automatic longint ref0(input logic [M0*N0*W0-1:0] c);
    longint s = 0;
    for (int i = 0; i < M0; i++)
      for (int j = 0; j < N0; j++)
        s += longint'(c[(i*N0+j)*W0 +: W0]) << (i + j);
    return s;
  endfunction

  function automatic longint ref1(input logic [M1*N1*W1-1:0] c);
    longint s = 0;
    for (int i = 0; i < M1; i++)
      for (int j = 0; j < N1; j++)
        s += longint'(c[(i*N1+j)*W1 +: W1]) << (i + j);
    return s;
  endfunction

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < M0*N0*W0; k++) c0[k] = 1'($urandom);
      for (int k = 0; k < M1*N1*W1; k++) c1[k] = 1'($urandom);
      if (t == 0) begin c0 = '1; c1 = '1; end
      if (t == 1) begin c0 = '0; c1 = '0; end
      #1;
      e = ref0(c0) & ((longint'(1) << PW0) - 1);
      check(longint'(s0_dadda),   e, "dadda 4x4");
      check(longint'(s0_wallace), e, "wallace 4x4");
      e = ref1(c1) & ((longint'(1) << PW1) - 1);
      check(longint'(s1_dadda),   e, "dadda 6x5");
      check(longint'(s1_wallace), e, "wallace 6x5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
