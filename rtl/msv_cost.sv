// msv_cost: thermal cost of one block, eq. (4) of the method:
//   cost = alpha * switching_activity + beta * power_density + gamma * P_B
// alpha, beta and gamma are Q0.8 fractions (0 < x < 1); the activity is a
// Q0.8 fraction scaled to the same range as the power density by using its
// raw 8-bit code. The three products are added and the 8 fraction bits are
// dropped, so the cost is in the units of the power density.
// Combinational. The formula follows the source; the fixed-point format is
// this design's choice.
module msv_cost
  import msv_pkg::*;
(
  input  logic [7:0]        alpha,
  input  logic [7:0]        beta,
  input  logic [7:0]        gamma,
  input  logic [7:0]        activity,
  input  logic [DW-1:0]     power_density,
  input  logic [DW-1:0]     proximity,
  output logic [COST_W-1:0] cost
);

  logic [DW+9:0] acc;

  always_comb begin
    acc  = (DW+10)'(alpha) * (DW+10)'(activity)
         + (DW+10)'(beta)  * (DW+10)'(power_density)
         + (DW+10)'(gamma) * (DW+10)'(proximity);
    cost = COST_W'(acc >> 8);
  end

endmodule
