// corr_comparator: chooses the correction that adder C adds to T.
//
// Inputs are T = x1 + x3 - 2*x2 from adder B (signed, in [-2*m3, 2*m3]) and
// the sign of adder A (x1 > x2). The corrected term k' = (T + c)/2 must equal
// |(x1+x3)/2 - x2|_m3 for even T and |(m3 + x1+x3)/2 - x2|_m3 for odd T, plus
// m3 when that residue is 0 and x1 > x2: in exactly that case the binary sum
// would be negative, and adding m3 to k' adds M after the m1m2 multiplier,
// which removes the mod-M correction. This gives, with T compared with
// -m3, 0 and m3:
//   even T:  c = 2m3 if T < 0, or T = 0 and x1 > x2;  otherwise 0
//            (T = 2m3 only occurs with x1 > x2, so k' = m3 is already right)
//   odd T:   c = 3m3 if T < -m3;  c = -m3 if T > m3;  otherwise c = m3
//            (T = m3 only occurs with x1 > x2, so k' = m3 is already right;
//            T = -m3 gives k' = 0 but then x1 - x2 = x2 - x3 - m3 <= 0, so
//            no +M correction is ever needed there)
// The comparator with inputs m3 and -m3, and the five correction constants
// follow the converter's block diagram; the rules above are derived here from
// the converter's equations. Purely combinational.
module corr_comparator
  import rns_pkg::*;
#(
  parameter int unsigned WT = 11,
  parameter int unsigned M3 = 253
) (
  input  logic signed [WT-1:0] t,
  input  logic                 a_neg,
  output corr_sel_e            sel
);

  localparam logic signed [WT-1:0] PM3 = WT'(M3);
  localparam logic signed [WT-1:0] NM3 = -WT'(M3);

  logic lt_nm3, gt_pm3, neg, zero;

  always_comb begin
    lt_nm3 = t < NM3;
    gt_pm3 = t > PM3;
    neg    = t[WT-1];
    zero   = t == '0;
    if (!t[0]) begin
      sel = (neg || (zero && a_neg)) ? CORR_P_2M3 : CORR_ZERO;
    end else if (lt_nm3) begin
      sel = CORR_P_3M3;
    end else if (gt_pm3) begin
      sel = CORR_N_M3;
    end else begin
      sel = CORR_P_M3;
    end
  end

endmodule
