// adder_c: adder C of the converter, k' = (T + c) / 2.
//
// Adds the doubled provisional sum T and the selected correction c on WT bits
// with a prefix adder. The sum is always even and lies in [0, 2*m3]; its
// rightmost bit, which only undoes the doubling of adder B, is dropped and
// k' = sum[WK:1] goes to the m1m2 multiplier. The dropped bit is brought out
// as lsb so that the top level can assert that it is 0. Follows the
// converter's adder C. Purely combinational.
module adder_c #(
  parameter int unsigned WT = 11,
  parameter int unsigned WK = 8
) (
  input  logic signed [WT-1:0] t,
  input  logic signed [WT-1:0] c,
  output logic        [WK-1:0] k,
  output logic                 lsb,
  output logic                 neg
);

  logic [WT-1:0] sum;

  prefix_adder #(.W(WT)) u_add (.a(t), .b(c), .cin(1'b0), .sum(sum), .cout());

  assign k   = sum[WK:1];
  assign lsb = sum[0];
  assign neg = sum[WT-1];

endmodule
