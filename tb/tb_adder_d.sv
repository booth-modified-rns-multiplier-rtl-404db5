// tb_adder_d: checks adder D, X = p1 + p2, with the widths of the default
// converter (19-bit p1, 27-bit p2, 24-bit X). Random p1 in the range of
// m2*A + x2 and random p2 = m1m2*k' with k' in [0, m3] are added, keeping
// pairs whose sum lies in [0, M); corner pairs (0, M-1 and the +M case) too.
module tb_adder_d;

  localparam longint M12 = 255 * 254;
  localparam longint M   = M12 * 253;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [18:0] p1;
  logic signed [26:0] p2;
  logic        [23:0] x;

  adder_d #(.W1(19), .W2(27), .WM(24)) dut (.p1(p1), .p2(p2), .x(x));

  int checks = 0, failures = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint v1, input longint v2);
    @(negedge clk);
    p1 = 19'(v1); p2 = 27'(v2);
    @(posedge clk);
    checks++;
    if (longint'(x) != v1 + v2) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d got %0d", v1, v2, x);
    end
  endtask

  initial begin
    p1 = '0; p2 = '0;
    apply(0, 0);
    apply(-254 * 255, M);               // x1 = 255... +M correction case
    apply(254 * 253 + 253, M - M12);    // largest X
    while (checks < 20000) begin
      longint v1, v2;
      v1 = 254 * (longint'($urandom_range(0, 508)) - 255) + longint'($urandom_range(0, 253));
      v2 = M12 * longint'($urandom_range(0, 253));
      if (v1 + v2 >= 0 && v1 + v2 < M) apply(v1, v2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
