// booth_r8_mac: radix-8 Booth multiplier with an addend, p = x*y + z.
//
// The multiplier y (signed, WY bits) is recoded into NPP = ceil(WY/3) radix-8
// Booth digits in {-4..4}; each digit comes from an overlapping 4-bit window
// y[3i+2:3i-1] with y[-1] = 0. Each digit selects 0, x, 2x, 3x or 4x; the hard
// multiple 3x is formed once by a prefix adder. A negative digit inverts its
// row and puts a 1 at the row's weight in a separate correction row, so that
// no row needs its own incrementer. The NPP partial-product rows, the
// correction row and the unsigned addend z are reduced by a chain of 3:2
// carry-save adders and summed by one prefix adder. With WY = 9 (the 9-bit
// signed operands of the default converter) there are 3 partial products.
//
// The radix-8 Booth recoding, the count of 3 partial products and the idea of
// folding the x2 addend of adder D into the multiplier follow the converter's
// description; the row format, the separate correction row and the linear
// carry-save chain are this design's own. Purely combinational. WP must be
// large enough for x*y+z; the result is taken modulo 2^WP.
module booth_r8_mac #(
  parameter int unsigned WX = 9,   // multiplicand width, signed
  parameter int unsigned WY = 9,   // multiplier width, signed, Booth recoded
  parameter int unsigned WZ = 8,   // addend width, unsigned
  parameter int unsigned WP = 19   // product width, signed
) (
  input  logic signed [WX-1:0] x,
  input  logic signed [WY-1:0] y,
  input  logic        [WZ-1:0] z,
  output logic signed [WP-1:0] p
);

  localparam int unsigned NPP = (WY + 2) / 3;   // partial products
  localparam int unsigned NR  = NPP + 2;        // rows to add
  localparam int unsigned WM  = WX + 3;         // width of a multiple, up to 4x

  // Hard multiple 3x = x + 2x.
  logic [WX+1:0] x1e, x2e, x3;
  assign x1e = {{2{x[WX-1]}}, x};
  assign x2e = {x[WX-1], x, 1'b0};
  prefix_adder #(.W(WX + 2)) u_x3 (
    .a(x1e), .b(x2e), .cin(1'b0), .sum(x3), .cout()
  );

  logic [3*NPP:0]  ywin;              // y sign-extended, with y[-1] = 0 at bit 0
  logic [WP-1:0]   row [NR];
  logic [NPP-1:0]  neg;

  always_comb begin
    ywin = {{(3*NPP - WY){y[WY-1]}}, y, 1'b0};
    row[NPP] = '0;
    for (int unsigned i = 0; i < NPP; i++) begin
      logic [3:0]        win;
      logic signed [WM-1:0] mag;
      logic [WP-1:0]     ext;
      win = ywin[3*i +: 4];
      neg[i] = win[3] & ~(win[2] & win[1] & win[0]);
      unique case (win)
        4'b0000, 4'b1111: mag = '0;
        4'b0001, 4'b0010, 4'b1101, 4'b1110: mag = WM'(x);
        4'b0011, 4'b0100, 4'b1011, 4'b1100: mag = WM'(signed'({x, 1'b0}));
        4'b0101, 4'b0110, 4'b1001, 4'b1010: mag = WM'(signed'(x3));
        default: mag = WM'(signed'({x, 2'b00}));   // 0111, 1000
      endcase
      ext = WP'(mag);
      if (neg[i]) ext = ~ext;
      row[i] = ext << (3 * i);
      row[NPP][3*i] = neg[i];
    end
    row[NPP+1] = WP'(z);
  end

  // Carry-save reduction: one 3:2 compressor per row beyond the first two.
  logic [WP-1:0] cs_s [NR-1];
  logic [WP-1:0] cs_c [NR-1];
  assign cs_s[0] = row[0];
  assign cs_c[0] = row[1];
  for (genvar j = 0; j < NR - 2; j++) begin : g_csa
    csa_3to2 #(.W(WP)) u_csa (
      .a(cs_s[j]), .b(cs_c[j]), .d(row[j+2]), .s(cs_s[j+1]), .c(cs_c[j+1])
    );
  end

  logic [WP-1:0] psum;
  prefix_adder #(.W(WP)) u_cpa (
    .a(cs_s[NR-2]), .b(cs_c[NR-2]), .cin(1'b0), .sum(psum), .cout()
  );
  assign p = signed'(psum);

endmodule
