// adder_d: adder D of the converter, X = p1 + p2.
//
// p1 = m2*A + x2 comes from the m2 Booth multiplier (which already absorbs the
// x2 addend, so D is a plain two-input adder) and p2 = m1m2*k' from the m1m2
// Booth multiplier. Both are sign-extended to a common width, added by a
// prefix adder, and the low WM bits are the binary result in [0, M). Follows
// the converter's two-input adder D. Purely combinational.
module adder_d #(
  parameter int unsigned W1 = 19,
  parameter int unsigned W2 = 25,
  parameter int unsigned WM = 24
) (
  input  logic signed [W1-1:0] p1,
  input  logic signed [W2-1:0] p2,
  output logic        [WM-1:0] x
);

  localparam int unsigned WD = ((W1 > W2) ? W1 : W2) + 1;

  logic [WD-1:0] a, b, sum;

  assign a = WD'(p1);
  assign b = WD'(p2);

  prefix_adder #(.W(WD)) u_add (.a(a), .b(b), .cin(1'b0), .sum(sum), .cout());

  assign x = sum[WM-1:0];

endmodule
