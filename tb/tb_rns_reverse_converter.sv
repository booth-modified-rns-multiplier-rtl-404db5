// tb_rns_reverse_converter: end-to-end test of the residue-to-binary converter.
//
// For a reduced modulus parameter (P = 20, M = 63960) every X in [0, M) is
// turned into its residues by the % operator and applied to the converter,
// one value per clock; the output must equal X. This covers every residue
// triple. The test also counts how often each correction of adder C was
// selected (-m3, 0, m3, 2m3, 3m3), how often the final +M correction (k' = m3)
// took place (and by which of its three paths: even T = 0 with x1 > x2,
// even T = 2*m3, odd T = m3) and how often each parity occurred, and counts a failure for any
// mechanism that never happened. A second instance at P = 3 runs the same
// sweep on the smallest interesting moduli set {7, 6, 5}.
module tb_rns_reverse_converter;
  import rns_pkg::*;

  localparam int unsigned P  = 20;
  localparam int unsigned WR = res_width(P);
  localparam int unsigned WM = out_width(P);
  localparam int unsigned M1 = 2 * P + 1, M2 = 2 * P, M3 = 2 * P - 1;
  localparam int unsigned M  = M1 * M2 * M3;

  localparam int unsigned PS  = 3;
  localparam int unsigned WRS = res_width(PS);
  localparam int unsigned WMS = out_width(PS);
  localparam int unsigned MS  = (2 * PS + 1) * (2 * PS) * (2 * PS - 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WR-1:0]  x1, x2, x3;
  logic [WM-1:0]  x;
  logic [WRS-1:0] s1, s2, s3;
  logic [WMS-1:0] sx;

  rns_reverse_converter #(.P(P))  dut   (.x1(x1), .x2(x2), .x3(x3), .x(x));
  rns_reverse_converter #(.P(PS)) dut_s (.x1(s1), .x2(s2), .x3(s3), .x(sx));

  int checks = 0, failures = 0;
  int sel_count [5];
  int plus_m = 0, n_even = 0, n_odd = 0;
  int pm_even0 = 0, pm_even2 = 0, pm_odd = 0;   // the three ways k' = m3 arises

  initial begin
    repeat (M + MS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel_count[i]) sel_count[i] = 0;
    x1 = '0; x2 = '0; x3 = '0;
    s1 = '0; s2 = '0; s3 = '0;
    for (int unsigned v = 0; v < M; v++) begin
      @(negedge clk);
      x1 = WR'(v % M1); x2 = WR'(v % M2); x3 = WR'(v % M3);
      @(posedge clk);
      checks++;
      if (x !== WM'(v)) begin
        failures++;
        if (failures < 10)
          $display("FAIL P=%0d X=%0d residues (%0d,%0d,%0d) got %0d", P, v, x1, x2, x3, x);
      end
      sel_count[dut.sel]++;
      if (dut.k == WR'(M3)) begin
        plus_m++;
        if (dut.t[0])                 pm_odd++;    // odd T = m3, +m3
        else if (dut.t == '0)         pm_even0++;  // even T = 0, x1 > x2, +2m3
        else                          pm_even2++;  // even T = 2m3, +0
      end
      if (dut.t[0]) n_odd++; else n_even++;
    end
    for (int unsigned v = 0; v < MS; v++) begin
      @(negedge clk);
      s1 = WRS'(v % (2 * PS + 1)); s2 = WRS'(v % (2 * PS)); s3 = WRS'(v % (2 * PS - 1));
      @(posedge clk);
      checks++;
      if (sx !== WMS'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL P=%0d X=%0d got %0d", PS, v, sx);
      end
    end
    $display("corrections: 0:%0d +m3:%0d +2m3:%0d +3m3:%0d -m3:%0d  +M:%0d  even:%0d odd:%0d",
             sel_count[CORR_ZERO], sel_count[CORR_P_M3], sel_count[CORR_P_2M3],
             sel_count[CORR_P_3M3], sel_count[CORR_N_M3], plus_m, n_even, n_odd);
    foreach (sel_count[i]) begin
      checks++;
      if (sel_count[i] == 0) begin
        failures++;
        $display("FAIL correction select %0d never used", i);
      end
    end
    $display("+M paths: T=0:%0d T=2m3:%0d T=m3:%0d", pm_even0, pm_even2, pm_odd);
    checks += 6;
    if (pm_even0 == 0) begin failures++; $display("FAIL +M via T=0 never happened"); end
    if (pm_even2 == 0) begin failures++; $display("FAIL +M via T=2m3 never happened"); end
    if (pm_odd == 0)   begin failures++; $display("FAIL +M via T=m3 never happened"); end
    if (plus_m == 0) begin failures++; $display("FAIL +M correction never happened"); end
    if (n_even == 0) begin failures++; $display("FAIL even parity never seen"); end
    if (n_odd == 0)  begin failures++; $display("FAIL odd parity never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
