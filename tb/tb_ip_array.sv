// tb_ip_array: end-to-end test of the inner-product array. Four instances
// run the same random element stream: unsigned and signed, each with the
// Dadda and the Wallace tree, at the case-study size M = N = 4, L = 7. A
// fifth, signed 8x6 array with L = 16 checks that the Baugh-Wooley constant
// and the NAND placement scale. Elements arrive with random idle cycles and
// vectors follow each other back to back. Every result is compared with
// sum A_k*B_k computed here, and must appear exactly 2 cycles after the last
// element of its vector.
module tb_ip_array;
  import ip_pkg::*;

  localparam int unsigned M = 4, N = 4, L = 7;
  localparam int unsigned PW = prod_width(M, N, L);
  localparam int unsigned M2 = 8, N2 = 6, L2 = 16;
  localparam int unsigned PW2 = prod_width(M2, N2, L2);
  localparam int unsigned NVEC = 400;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid;
  logic [M-1:0]   a;
  logic [N-1:0]   b;
  logic [M2-1:0]  a2;
  logic [N2-1:0]  b2;
  logic           v_ud, v_uw, v_sd, v_sw, v_s2;
  logic [PW-1:0]  p_ud, p_uw, p_sd, p_sw;
  logic [PW2-1:0] p_s2;
  int             checks = 0, failures = 0;

  always #5 clk = ~clk;

  ip_array #(.M(M), .N(N), .L(L), .SIGNED_MODE(0), .TREE(TREE_DADDA))   u_ud
    (.clk, .rst_n, .in_valid, .a, .b, .out_valid(v_ud), .p(p_ud));
  ip_array #(.M(M), .N(N), .L(L), .SIGNED_MODE(0), .TREE(TREE_WALLACE)) u_uw
    (.clk, .rst_n, .in_valid, .a, .b, .out_valid(v_uw), .p(p_uw));
  ip_array #(.M(M), .N(N), .L(L), .SIGNED_MODE(1), .TREE(TREE_DADDA))   u_sd
    (.clk, .rst_n, .in_valid, .a, .b, .out_valid(v_sd), .p(p_sd));
  ip_array #(.M(M), .N(N), .L(L), .SIGNED_MODE(1), .TREE(TREE_WALLACE)) u_sw
    (.clk, .rst_n, .in_valid, .a, .b, .out_valid(v_sw), .p(p_sw));
  ip_array #(.M(M2), .N(N2), .L(L2), .SIGNED_MODE(1), .TREE(TREE_DADDA)) u_s2
    (.clk, .rst_n, .in_valid, .a(a2), .b(b2), .out_valid(v_s2), .p(p_s2));

  // Expected results, queued when a vector's last element is applied.
  longint      exp_u [$], exp_s [$], exp_s2 [$];
  int unsigned due [$];        // cycle in which out_valid must be high
  int unsigned cycle = 0;
  int unsigned results = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NVEC * L2 * 3 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(negedge clk) if (rst_n) begin
    if (v_ud || v_uw || v_sd || v_sw || (due.size() > 0 && due[0] == cycle)) begin
      checks++;
      if (!(due.size() > 0 && due[0] == cycle && v_ud && v_uw && v_sd && v_sw)) begin
        failures++;
        $display("cycle %0d: out_valid %b%b%b%b at the wrong time", cycle, v_ud, v_uw, v_sd, v_sw);
      end
      if (due.size() > 0 && due[0] == cycle) begin
        longint eu, es;
        eu = exp_u.pop_front();
        es = exp_s.pop_front();
        void'(due.pop_front());
        results++;
        checks++;
        if (p_ud != PW'(eu) || p_uw != PW'(eu)) begin
          failures++;
          $display("unsigned: dadda %0d wallace %0d expected %0d", p_ud, p_uw, eu);
        end
        checks++;
        if ($signed(p_sd) != PW'(es) || $signed(p_sw) != PW'(es)) begin
          failures++;
          $display("signed: dadda %0d wallace %0d expected %0d",
                   $signed(p_sd), $signed(p_sw), es);
        end
      end
    end
  end

  initial begin
    longint su, ss, ss2;
    int unsigned k, k2;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; a2 = '0; b2 = '0;
    su = 0; ss = 0; ss2 = 0; k = 0; k2 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (results < NVEC) begin
      @(negedge clk);
      in_valid = (results > 20) ? 1'b1 : ($urandom_range(0, 3) != 0);
      a  = M'($urandom);
      b  = N'($urandom);
      a2 = M2'($urandom);
      b2 = N2'($urandom);
      if (exp_u.size() + results < 8 && exp_u.size() == 0 && results < 4) begin
        // extreme operands in the first vectors
        a = (results[0]) ? '1 : {1'b1, {(M-1){1'b0}}};
        b = (results[0]) ? '1 : {1'b1, {(N-1){1'b0}}};
      end
      if (in_valid) begin
        su  += longint'(a) * longint'(b);
        ss  += longint'($signed(a)) * longint'($signed(b));
        ss2 += longint'($signed(a2)) * longint'($signed(b2));
        k++;
        k2++;
        if (k == L) begin
          exp_u.push_back(su);
          exp_s.push_back(ss);
          due.push_back(cycle + 2);
          su = 0; ss = 0; k = 0;
        end
        if (k2 == L2) begin
          exp_s2.push_back(ss2);
          ss2 = 0; k2 = 0;
        end
      end
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_s2.size() != 0) begin
      failures++;
      $display("%0d results of the 8x6 array missing", exp_s2.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && v_s2) begin
    longint e;
    checks++;
    if (exp_s2.size() == 0) begin
      failures++;
      $display("8x6 array: unexpected result");
    end else begin
      e = exp_s2.pop_front();
      if ($signed(p_s2) != PW2'(e)) begin
        failures++;
        $display("8x6 signed: got %0d expected %0d", $signed(p_s2), e);
      end
    end
  end
endmodule
