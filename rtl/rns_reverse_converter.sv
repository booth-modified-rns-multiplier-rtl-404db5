// rns_reverse_converter: residue-to-binary converter for the moduli set
// {m1, m2, m3} = {2P+1, 2P, 2P-1}, M = m1*m2*m3.
//
// From the residues x1 = X mod m1, x2 = X mod m2 and x3 = X mod m3 it forms
//   X = m2*(x2 - x1) + x2 + m1*m2*k'
//   k' = |(x1+x3)/2 - x2|_m3          for x1+x3 even
//   k' = |(m3+x1+x3)/2 - x2|_m3       for x1+x3 odd
// plus m3 on k' in the one case where the sum would otherwise be negative
// (k' = 0 and x1 > x2), which adds M and replaces any mod-M reduction.
// Datapath, all combinational:
//   adder A      A = x2 - x1, its sign goes to the comparator
//   m2 mult      p1 = m2*A + x2 (radix-8 Booth, x2 folded in as addend)
//   adder B      T = x1 + x3 - 2*x2 (CSA + prefix CPA), i.e. 2x the sum
//   comparator   picks the correction from T's parity, T vs. -m3/0/m3, sign A
//   mux          one of -m3, 0, m3, 2m3, 3m3
//   adder C      k' = (T + c) >> 1
//   m1m2 mult    p2 = m1*m2*k' (radix-8 Booth)
//   adder D      X = p1 + p2
// The structure and the five correction constants follow the converter's
// block diagram and equations. P is not fixed by the description: the default
// P = 127 gives 8-bit residues and 9-bit Booth operands, hence the three
// partial products per multiplier that the description states. There are no
// registers; a result is valid one combinational delay after the inputs.
// Inputs must be valid residues (x1 <= 2P, x2 <= 2P-1, x3 <= 2P-2).
module rns_reverse_converter
  import rns_pkg::*;
#(
  parameter int unsigned P = 127
) (
  input  logic [res_width(P)-1:0] x1,   // X mod 2P+1
  input  logic [res_width(P)-1:0] x2,   // X mod 2P
  input  logic [res_width(P)-1:0] x3,   // X mod 2P-1
  output logic [out_width(P)-1:0] x     // X in [0, M)
);

  localparam int unsigned M1 = 2 * P + 1;
  localparam int unsigned M2 = 2 * P;
  localparam int unsigned M3 = 2 * P - 1;
  localparam longint unsigned M12 = longint'(M1) * longint'(M2);

  localparam int unsigned WR  = res_width(P);
  localparam int unsigned WA  = WR + 1;              // adder A
  localparam int unsigned WT  = WR + 3;              // adders B and C
  localparam int unsigned WK  = WR;                  // k' <= m3
  localparam int unsigned WM  = out_width(P);
  localparam int unsigned WX1 = WR + 1;              // m2, signed
  localparam int unsigned WP1 = WX1 + WA + 1;
  localparam int unsigned WX2 = bits_for(M12) + 1;   // m1*m2, signed
  localparam int unsigned WP2 = WX2 + WK + 1;

  localparam logic signed [WX1-1:0] M2_C  = WX1'(M2);
  localparam logic signed [WX2-1:0] M12_C = WX2'(M12);

  logic signed [WA-1:0]  a;
  logic                  a_neg;
  logic signed [WT-1:0]  t, c;
  corr_sel_e             sel;
  logic        [WK-1:0]  k;
  logic                  c_lsb, c_neg;
  logic signed [WP1-1:0] p1;
  logic signed [WP2-1:0] p2;

  adder_a #(.WR(WR)) u_adder_a (.x1(x1), .x2(x2), .a(a), .a_neg(a_neg));

  booth_r8_mac #(.WX(WX1), .WY(WA), .WZ(WR), .WP(WP1)) u_mult_m2 (
    .x(M2_C), .y(a), .z(x2), .p(p1)
  );

  adder_b #(.WR(WR)) u_adder_b (.x1(x1), .x2(x2), .x3(x3), .t(t));

  corr_comparator #(.WT(WT), .M3(M3)) u_cmp (.t(t), .a_neg(a_neg), .sel(sel));

  corr_mux #(.WT(WT), .M3(M3)) u_mux (.sel(sel), .c(c));

  adder_c #(.WT(WT), .WK(WK)) u_adder_c (
    .t(t), .c(c), .k(k), .lsb(c_lsb), .neg(c_neg)
  );

  booth_r8_mac #(.WX(WX2), .WY(WK + 1), .WZ(1), .WP(WP2)) u_mult_m1m2 (
    .x(M12_C), .y(signed'({1'b0, k})), .z(1'b0), .p(p2)
  );

  adder_d #(.W1(WP1), .W2(WP2), .WM(WM)) u_adder_d (.p1(p1), .p2(p2), .x(x));

  // Adder C must land on an even value in [0, 2*m3] for every valid input.
  always_comb begin
    if (x1 <= WR'(M1 - 1) && x2 <= WR'(M2 - 1) && x3 <= WR'(M3 - 1)) begin
      assert (!c_lsb && !c_neg && k <= WK'(M3))
        else $error("adder C out of range: t=%0d c=%0d", t, c);
    end
  end

endmodule
