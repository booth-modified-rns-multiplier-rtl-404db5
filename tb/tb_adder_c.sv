// tb_adder_c: checks adder C, k' = (T + c)/2 with the LSB dropped.
//
// For m3 = 253 (P = 127) every T in [-2*m3, 2*m3] is combined with each of
// the five corrections; for the combinations whose sum is even and in
// [0, 2*m3] (those the converter can produce) k must be the half sum and lsb
// and neg must be 0; for an odd sum lsb must be 1.
module tb_adder_c;

  localparam int M3 = 253;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [10:0] t, c;
  logic        [7:0]  k;
  logic               lsb, neg;

  adder_c #(.WT(11), .WK(8)) dut (.t(t), .c(c), .k(k), .lsb(lsb), .neg(neg));

  int checks = 0, failures = 0;
  int cs [5] = '{0, M3, 2 * M3, 3 * M3, -M3};

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t = '0; c = '0;
    for (int tv = -2 * M3; tv <= 2 * M3; tv++)
      foreach (cs[i]) begin
        int s;
        s = tv + cs[i];
        if (s < 0 || s > 2 * M3) continue;
        @(negedge clk);
        t = 11'(tv); c = 11'(cs[i]);
        @(posedge clk);
        checks++;
        if (s % 2 == 0) begin
          if (int'(k) != s / 2 || lsb || neg) begin
            failures++;
            if (failures < 10) $display("FAIL T=%0d c=%0d got k=%0d lsb=%b", tv, cs[i], k, lsb);
          end
        end else if (!lsb || int'(k) != s / 2) begin
          failures++;
          if (failures < 10) $display("FAIL T=%0d c=%0d odd sum, lsb=%b k=%0d", tv, cs[i], lsb, k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
