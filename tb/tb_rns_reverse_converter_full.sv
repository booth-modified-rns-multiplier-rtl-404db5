// tb_rns_reverse_converter_full: exhaustive test of the converter at its
// default size (P = 127, moduli {255, 254, 253}, M = 16386810).
//
// Every X in [0, M) is reduced by the % operator to its three residues, which
// are applied to the converter one per clock; the output must equal X. Since
// the residue map is a bijection on [0, M), this covers every valid input
// triple. Corrections of adder C are counted per kind, together with the
// final +M correction, and a kind that never occurs counts as a failure.
module tb_rns_reverse_converter_full;
  import rns_pkg::*;

  localparam int unsigned P  = 127;   // must match the converter's default
  localparam int unsigned WR = res_width(P);
  localparam int unsigned WM = out_width(P);
  localparam int unsigned M1 = 2 * P + 1, M2 = 2 * P, M3 = 2 * P - 1;
  localparam int unsigned M  = M1 * M2 * M3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WR-1:0] x1, x2, x3;
  logic [WM-1:0] x;

  rns_reverse_converter dut (.x1(x1), .x2(x2), .x3(x3), .x(x));

  int checks = 0, failures = 0;
  int sel_count [5];
  int plus_m = 0;

  initial begin
    repeat (M + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel_count[i]) sel_count[i] = 0;
    x1 = '0; x2 = '0; x3 = '0;
    checks++;
    if ($bits(x1) != 8 || $bits(x) != 24) begin
      failures++;
      $display("FAIL unexpected widths %0d %0d", $bits(x1), $bits(x));
    end
    for (int unsigned v = 0; v < M; v++) begin
      @(negedge clk);
      x1 = WR'(v % M1); x2 = WR'(v % M2); x3 = WR'(v % M3);
      @(posedge clk);
      checks++;
      if (x !== WM'(v)) begin
        failures++;
        if (failures < 10)
          $display("FAIL X=%0d residues (%0d,%0d,%0d) got %0d", v, x1, x2, x3, x);
      end
      sel_count[dut.sel]++;
      if (dut.k == WR'(M3)) plus_m++;
    end
    $display("corrections: 0:%0d +m3:%0d +2m3:%0d +3m3:%0d -m3:%0d  +M:%0d",
             sel_count[CORR_ZERO], sel_count[CORR_P_M3], sel_count[CORR_P_2M3],
             sel_count[CORR_P_3M3], sel_count[CORR_N_M3], plus_m);
    foreach (sel_count[i]) begin
      checks++;
      if (sel_count[i] == 0) begin
        failures++;
        $display("FAIL correction select %0d never used", i);
      end
    end
    checks++;
    if (plus_m == 0) begin failures++; $display("FAIL +M correction never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
