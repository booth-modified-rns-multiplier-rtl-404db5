// tb_adder_b: checks adder B, T = x1 + x3 - 2*x2.
//
// With 5-bit residues every triple is applied (32768 cases); with the default
// 8-bit residues the corners of the residue ranges of P = 127 and 30000 random
// triples are applied. T is compared with the integer expression.
module tb_adder_b;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        [7:0]  x1, x2, x3;
  logic signed [10:0] t;
  logic        [4:0]  s1, s2, s3;
  logic signed [7:0]  ts;

  adder_b #(.WR(8)) dut   (.x1(x1), .x2(x2), .x3(x3), .t(t));
  adder_b #(.WR(5)) dut_s (.x1(s1), .x2(s2), .x3(s3), .t(ts));

  int checks = 0, failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v1, input int v2, input int v3);
    @(negedge clk);
    x1 = 8'(v1); x2 = 8'(v2); x3 = 8'(v3);
    @(posedge clk);
    checks++;
    if (int'(t) != v1 + v3 - 2 * v2) begin
      failures++;
      if (failures < 10) $display("FAIL %0d %0d %0d got %0d", v1, v2, v3, t);
    end
  endtask

  initial begin
    x1 = '0; x2 = '0; x3 = '0; s1 = '0; s2 = '0; s3 = '0;
    apply(254, 0, 252);
    apply(0, 253, 0);
    apply(254, 253, 252);
    apply(0, 0, 0);
    for (int i = 0; i < 30000; i++)
      apply(int'($urandom_range(0, 254)), int'($urandom_range(0, 253)), int'($urandom_range(0, 252)));
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int k = 0; k < 32; k++) begin
          s1 = 5'(i); s2 = 5'(j); s3 = 5'(k);
          #1;
          checks++;
          if (int'(ts) != i + k - 2 * j) begin
            failures++;
            if (failures < 10) $display("FAIL W5 %0d %0d %0d got %0d", i, j, k, ts);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
