// tb_corr_mux: checks that each select of the correction mux gives its
// constant -m3, 0, m3, 2m3 or 3m3, for m3 = 253 (P = 127) and m3 = 5 (P = 3).
module tb_corr_mux;
  import rns_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  corr_sel_e            sel;
  logic signed [10:0]   c;
  logic signed [4:0]    cs;

  corr_mux #(.WT(11), .M3(253)) dut   (.sel(sel), .c(c));
  corr_mux #(.WT(5),  .M3(5))   dut_s (.sel(sel), .c(cs));

  int checks = 0, failures = 0;

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input corr_sel_e s, input int e1, input int e2);
    @(negedge clk);
    sel = s;
    @(posedge clk);
    checks += 2;
    if (int'(c) != e1)  begin failures++; $display("FAIL sel %0d: %0d != %0d", s, c, e1); end
    if (int'(cs) != e2) begin failures++; $display("FAIL sel %0d: %0d != %0d", s, cs, e2); end
  endtask

  initial begin
    sel = CORR_ZERO;
    apply(CORR_ZERO, 0, 0);
    apply(CORR_P_M3, 253, 5);
    apply(CORR_P_2M3, 506, 10);
    apply(CORR_P_3M3, 759, 15);
    apply(CORR_N_M3, -253, -5);
    apply(CORR_P_3M3, 759, 15);
    apply(CORR_ZERO, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
