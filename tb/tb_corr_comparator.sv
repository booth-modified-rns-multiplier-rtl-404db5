// tb_corr_comparator: checks the correction choice for every residue triple.
//
// For P = 20 (m3 = 39) every triple (x1, x2, x3) is turned into the
// comparator's inputs T = x1 + x3 - 2*x2 and x1 > x2. The expected correction
// is worked out from the number theory alone: k = |T/2|_m3 (even T) or
// |(T+m3)/2|_m3 (odd T), raised to m3 when k = 0 and x1 > x2; the correction
// is then c = 2k - T, which must be one of the five constants and must be
// the one selected.
module tb_corr_comparator;
  import rns_pkg::*;

  localparam int P = 20, M1 = 2 * P + 1, M2 = 2 * P, M3 = 2 * P - 1;
  localparam int WT = res_width(P) + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [WT-1:0] t;
  logic                 a_neg;
  corr_sel_e            sel;

  corr_comparator #(.WT(WT), .M3(M3)) dut (.t(t), .a_neg(a_neg), .sel(sel));

  int checks = 0, failures = 0;

  initial begin
    repeat (M1 * M2 * M3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cval(corr_sel_e s);
    case (s)
      CORR_ZERO:  return 0;
      CORR_P_M3:  return M3;
      CORR_P_2M3: return 2 * M3;
      CORR_P_3M3: return 3 * M3;
      CORR_N_M3:  return -M3;
      default:    return 9999;
    endcase
  endfunction

  initial begin
    t = '0; a_neg = 1'b0;
    for (int u1 = 0; u1 < M1; u1++)
      for (int u2 = 0; u2 < M2; u2++)
        for (int u3 = 0; u3 < M3; u3++) begin
          int tv, k, c_exp;
          tv = u1 + u3 - 2 * u2;
          if (tv % 2 == 0) k = ((tv / 2) % M3 + M3) % M3;
          else             k = (((tv + M3) / 2) % M3 + M3) % M3;
          if (k == 0 && u1 > u2) k = M3;
          c_exp = 2 * k - tv;
          @(negedge clk);
          t = WT'(tv); a_neg = (u1 > u2);
          @(posedge clk);
          checks++;
          if (cval(sel) != c_exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL T=%0d a_neg=%b: selected %0d, need %0d", tv, a_neg, cval(sel), c_exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
