// csa_3to2: W-bit 3:2 carry-save adder (a row of full adders).
//
// s + c == a + b + d (mod 2^W). s is the bitwise sum, c the majority shifted
// one place to the left (bit 0 of c is 0). Purely combinational. Used to
// reduce the rows of adder B and of the Booth multipliers before their
// carry-propagate adder.
module csa_3to2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-1:0] maj;

  always_comb begin
    s   = a ^ b ^ d;
    maj = (a & b) | (a & d) | (b & d);
    c   = {maj[W-2:0], 1'b0};
  end

endmodule
