// ip_pe: one processing element of the counter-based inner-product array.
//
// The PE forms the partial-product bit PP_k = A_k(i) & B_k(j) (or its NAND
// for the sign row/column of the signed array) and uses it as the enable of
// a W-bit binary ones counter clocked by clock1. Over the L cycles of one
// vector the counter therefore reaches C(i,j) = number of ones among the L
// partial-product bits, 0..L.
//
// Interface: a_bit/b_bit are the operand bits of the current element, valid
// when `en` is high. `clr` marks the first element of a vector: the counter
// restarts from that element's bit instead of adding to the old count, so
// vectors can follow each other without an idle cycle. `count` is the
// registered count. The AND/NAND choice and the counter follow the source
// figures; the merged clear-and-load and the `en` qualifier are this
// design's choices.
module ip_pe #(
  parameter int unsigned W      = 3,   // counter width, floor(log2 L)+1
  parameter bit          INVERT = 1'b0 // 1: NAND partial product (signed array)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic         a_bit,
  input  logic         b_bit,
  output logic [W-1:0] count
);

  logic pp;

  always_comb pp = INVERT ? ~(a_bit & b_bit) : (a_bit & b_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (en) begin
      if (clr) count <= W'(pp);
      else     count <= count + W'(pp);
    end
  end

endmodule
