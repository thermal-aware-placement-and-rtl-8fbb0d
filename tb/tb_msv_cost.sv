// tb_msv_cost: checks the thermal cost of eq. (4) against an integer
// reference, floor((alpha*act + beta*pd + gamma*P_B) / 256), for random and
// extreme inputs.
module tb_msv_cost;
  import msv_pkg::*;

  logic [7:0]        alpha, beta, gamma, activity;
  logic [DW-1:0]     power_density, proximity;
  logic [COST_W-1:0] cost;
  int                checks = 0, failures = 0;

  msv_cost dut (.alpha, .beta, .gamma, .activity, .power_density, .proximity, .cost);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int t = 0; t < 5000; t++) begin
      alpha = 8'($urandom); beta = 8'($urandom); gamma = 8'($urandom);
      activity = 8'($urandom);
      power_density = DW'($urandom); proximity = DW'($urandom);
      if (t == 0) begin
        alpha = '1; beta = '1; gamma = '1; activity = '1; power_density = '1; proximity = '1;
      end
      #1;
      e = (longint'(alpha) * activity + longint'(beta) * power_density
           + longint'(gamma) * proximity) / 256;
      checks++;
      if (longint'(cost) != e) begin
        failures++;
        $display("cost %0d expected %0d", cost, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
