// adder_b: three-input adder B of the converter, T = x1 + x3 - 2*x2.
//
// T is twice the provisional sum (x1+x3)/2 - x2: all operands are shifted
// left by one place so that no halving is needed, and T[0] is the parity of
// x1 + x3 that chooses between the even and odd correction rules. The three
// operands x1, x3 and ~(2*x2) go through a 3:2 carry-save adder; the +1 of the
// two's complement enters as the carry in of the prefix carry-propagate adder.
// T lies in [-2*m3, 2*m3] and is produced on WR+3 signed bits, the width of
// adder C. Follows the converter's CSA+CPA adder B. Purely combinational.
module adder_b #(
  parameter int unsigned WR = 8
) (
  input  logic        [WR-1:0] x1,
  input  logic        [WR-1:0] x2,
  input  logic        [WR-1:0] x3,
  output logic signed [WR+2:0] t
);

  localparam int unsigned WT = WR + 3;

  logic [WT-1:0] op1, op2, op3, s, c, sum;

  assign op1 = WT'(x1);
  assign op2 = WT'(x3);
  assign op3 = ~(WT'(x2) << 1);

  csa_3to2 #(.W(WT)) u_csa (.a(op1), .b(op2), .d(op3), .s(s), .c(c));

  prefix_adder #(.W(WT)) u_cpa (.a(s), .b(c), .cin(1'b1), .sum(sum), .cout());

  assign t = signed'(sum);

endmodule
