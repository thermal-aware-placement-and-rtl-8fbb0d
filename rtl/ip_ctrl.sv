// ip_ctrl: sequencing of the inner-product array (clock1 / clock2).
//
// The PE counters run on clock1 and take one vector element per cycle; the
// pipeline register behind them is clocked by clock2 = L x clock1. Here both
// run on one clock: this controller counts the accepted elements (0..L-1),
// tells the PEs which element is the first of a vector (`clr`), and raises
// `load` for one cycle right after the L-th element, when the counters hold
// the finished counts. `load` is the clock enable that stands for clock2.
//
// Interface: `in_valid` qualifies an element (no element, no count), `phase`
// is the index k of the next element. Timing: the last element of a vector
// is accepted in cycle t, `load` is high in cycle t+1. The single clock with
// an enable instead of a second clock, and `in_valid`, are this design's
// choices; the L-cycle rhythm follows the source.
module ip_ctrl #(
  parameter int unsigned L = 7   // inner product length
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   clr,
  output logic                   load,
  output logic [$clog2(L+1)-1:0] phase
);

  localparam int unsigned PW = $clog2(L + 1);

  logic last;

  always_comb begin
    clr  = (phase == '0);
    last = (phase == PW'(L - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      load  <= 1'b0;
    end else begin
      load <= in_valid && last;
      if (in_valid) phase <= last ? '0 : phase + 1'b1;
    end
  end

endmodule
