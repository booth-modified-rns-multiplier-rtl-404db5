// tb_booth_r8_mac: checks the radix-8 Booth multiply-add against x*y+z.
//
// Instance 1 has the shape of the converter's m2 multiplier (9-bit signed
// x and y, 8-bit addend, 19-bit product): every y in [-256, 255] is combined
// with the extreme multiplicands and with random ones, and random addends.
// Instance 2 has a 17-bit multiplicand and a 9-bit multiplier, the shape of
// the m1m2 multiplier. Both instances must use 3 partial products. Results are
// compared with products computed by the * operator on 64-bit integers.
module tb_booth_r8_mac;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [8:0]  x1, y1;
  logic        [7:0]  z1;
  logic signed [18:0] p1;
  logic signed [16:0] x2;
  logic signed [8:0]  y2;
  logic signed [26:0] p2;

  booth_r8_mac #(.WX(9),  .WY(9), .WZ(8), .WP(19)) dut1 (.x(x1), .y(y1), .z(z1), .p(p1));
  booth_r8_mac #(.WX(17), .WY(9), .WZ(1), .WP(27)) dut2 (.x(x2), .y(y2), .z(1'b0), .p(p2));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int vx1, input int vy, input int vz, input int vx2);
    longint e1, e2;
    @(negedge clk);
    x1 = 9'(vx1); y1 = 9'(vy); z1 = 8'(vz); x2 = 17'(vx2); y2 = 9'(vy);
    @(posedge clk);
    e1 = longint'(vx1) * longint'(vy) + longint'(vz);
    e2 = longint'(vx2) * longint'(vy);
    checks += 2;
    if (longint'(p1) != e1) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d+%0d got %0d", vx1, vy, vz, p1);
    end
    if (longint'(p2) != e2) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d got %0d", vx2, vy, p2);
    end
  endtask

  initial begin
    x1 = '0; y1 = '0; z1 = '0; x2 = '0; y2 = '0;
    checks += 2;
    if (dut1.NPP != 3) begin failures++; $display("FAIL m2 multiplier has %0d PPs", dut1.NPP); end
    if (dut2.NPP != 3) begin failures++; $display("FAIL m1m2 multiplier has %0d PPs", dut2.NPP); end
    for (int vy = -256; vy < 256; vy++) begin
      apply(255, vy, 255, 65535);
      apply(-256, vy, 0, -65536);
      apply(254, vy, 253, 64770);
      for (int r = 0; r < 8; r++)
        apply(int'($signed(9'($urandom))), vy, int'($urandom_range(0, 255)), int'($signed(17'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
