// tb_prefix_adder: checks the Sklansky prefix adder against the + operator.
//
// A 16-bit instance gets carry-chain corner cases (all-ones plus one, alternating
// patterns) and 20000 random operand pairs with random carry in; a 7-bit
// instance (width not a power of two) is tested exhaustively. Sum and carry
// out are compared with {cout, sum} = a + b + cin. One input set per clock.
module tb_prefix_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b, s;
  logic        ci, co;
  logic [6:0]  a7, b7, s7;
  logic        ci7, co7;

  prefix_adder #(.W(16)) dut   (.a(a),  .b(b),  .cin(ci),  .sum(s),  .cout(co));
  prefix_adder #(.W(7))  dut7  (.a(a7), .b(b7), .cin(ci7), .sum(s7), .cout(co7));

  int checks = 0, failures = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] va, input logic [15:0] vb, input logic vc);
    logic [16:0] ref_v;
    @(negedge clk);
    a = va; b = vb; ci = vc;
    @(posedge clk);
    ref_v = {1'b0, va} + {1'b0, vb} + 17'(vc);
    checks++;
    if ({co, s} !== ref_v) begin
      failures++;
      if (failures < 10) $display("FAIL W16 %h+%h+%b got %h exp %h", va, vb, vc, {co, s}, ref_v);
    end
  endtask

  initial begin
    a = '0; b = '0; ci = 1'b0; a7 = '0; b7 = '0; ci7 = 1'b0;
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'h0001, 1'b0);
    check16(16'haaaa, 16'h5555, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7fff, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++)
        for (int c = 0; c < 2; c++) begin
          a7 = 7'(i); b7 = 7'(j); ci7 = 1'(c);
          #1;
          checks++;
          if ({co7, s7} !== 8'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W7 %0d+%0d+%0d got %0d", i, j, c, {co7, s7});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
