// corr_mux: the selectable correction operand of adder C.
//
// Outputs one of the constants -m3, 0, m3, 2m3 and 3m3 (signed, WT bits)
// chosen by the comparator. Adding m3 to T = 2*S adds m3/2 to the provisional
// sum S, so the odd-parity term m3/2 of the conversion formula is merged into
// this single corrective step. The five inputs follow the converter's block
// diagram. Purely combinational.
module corr_mux
  import rns_pkg::*;
#(
  parameter int unsigned WT = 11,
  parameter int unsigned M3 = 253
) (
  input  corr_sel_e            sel,
  output logic signed [WT-1:0] c
);

  always_comb begin
    unique case (sel)
      CORR_ZERO:  c = '0;
      CORR_P_M3:  c = WT'(M3);
      CORR_P_2M3: c = WT'(2 * M3);
      CORR_P_3M3: c = WT'(3 * M3);
      CORR_N_M3:  c = -WT'(M3);
      default:    c = '0;
    endcase
  end

endmodule
