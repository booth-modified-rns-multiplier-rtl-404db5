// tb_adder_a: exhaustive test of adder A (A = x2 - x1) for 8-bit residues.
//
// Every pair (x1, x2) in [0, 255]^2 is applied; A must equal the integer
// difference and a_neg must be set exactly when x1 > x2.
module tb_adder_a;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        [7:0] x1, x2;
  logic signed [8:0] a;
  logic              a_neg;

  adder_a #(.WR(8)) dut (.x1(x1), .x2(x2), .a(a), .a_neg(a_neg));

  int checks = 0, failures = 0;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = '0; x2 = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        x1 = 8'(i); x2 = 8'(j);
        @(posedge clk);
        checks++;
        if (int'(a) != j - i || a_neg != (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL x1=%0d x2=%0d got a=%0d neg=%b", i, j, a, a_neg);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
