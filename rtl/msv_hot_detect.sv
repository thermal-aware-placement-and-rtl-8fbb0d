// msv_hot_detect: marks the blocks whose power density is above the mean
// plus one standard deviation of all NBLK blocks. These are the hot blocks
// that the method counts in the proximity factor (eq. 5) and moves to the
// chip edge.
//
// With S = sum pd and Q = sum pd^2 the test pd > mean + sd is, exactly,
//   NBLK*pd - S > 0  and  (NBLK*pd - S)^2 > NBLK*Q - S^2,
// which needs neither a square root nor a division. `n_hot` counts the hot
// blocks. Combinational. The threshold follows the source; the integer form
// is this design's.
module msv_hot_detect
  import msv_pkg::*;
#(
  parameter int unsigned NBLK = 10
) (
  input  logic [DW-1:0]          pd [NBLK],
  output logic                   hot [NBLK],
  output logic [$clog2(NBLK+1)-1:0] n_hot
);

  localparam int unsigned SW = DW + $clog2(NBLK + 1);       // width of S
  localparam int unsigned XW = 2 * SW + $clog2(NBLK + 1) + 2; // products

  logic [SW-1:0]        s_sum;
  logic [2*DW+SW-1:0]   q_sum;
  logic [XW-1:0]        var_n2, dev_sq;
  logic signed [SW+$clog2(NBLK+1)+1:0] dev;

  always_comb begin
    s_sum = '0;
    q_sum = '0;
    n_hot = '0;
    for (int i = 0; i < NBLK; i++) begin
      s_sum = s_sum + SW'(pd[i]);
      q_sum = q_sum + (2*DW+SW)'(pd[i]) * (2*DW+SW)'(pd[i]);
    end
    var_n2 = XW'(NBLK) * XW'(q_sum) - XW'(s_sum) * XW'(s_sum);
    for (int i = 0; i < NBLK; i++) begin
      dev    = $bits(dev)'(NBLK) * $bits(dev)'(pd[i]) - $bits(dev)'(s_sum);
      dev_sq = XW'(dev) * XW'(dev);
      hot[i] = (dev > 0) && (dev_sq > var_n2);
      n_hot  = n_hot + $bits(n_hot)'(hot[i]);
    end
  end

endmodule
