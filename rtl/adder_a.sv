// adder_a: adder A of the converter, A = x2 - x1.
//
// x1 (mod 2P+1) and x2 (mod 2P) are WR-bit unsigned residues. A is formed on
// WR+1 bits as x2 + ~x1 + 1 with one prefix adder and is the multiplier
// operand of the m2 Booth multiplier. Its sign bit a_neg (x1 > x2) is the
// comparator input that decides the final +M correction. Follows the
// converter's adder A; the two's-complement subtraction is this design's
// choice. Purely combinational.
module adder_a #(
  parameter int unsigned WR = 8
) (
  input  logic        [WR-1:0] x1,
  input  logic        [WR-1:0] x2,
  output logic signed [WR:0]   a,
  output logic                 a_neg
);

  logic [WR:0] diff;

  prefix_adder #(.W(WR + 1)) u_add (
    .a({1'b0, x2}), .b(~{1'b0, x1}), .cin(1'b1), .sum(diff), .cout()
  );

  assign a     = signed'(diff);
  assign a_neg = diff[WR];

endmodule
