// prefix_adder: W-bit parallel-prefix carry-propagate adder (Sklansky tree).
//
// sum = a + b + cin (mod 2^W), cout is the carry out of bit W-1.
// Bit-level generate/propagate signals are combined in ceil(log2 W) prefix
// levels; at level l every bit whose index has bit l set takes the group
// (g, p) of the last bit of the block below it. The carry in is folded into
// the generate signal of bit 0. This is the carry-propagate adder used by
// every adder and by both multipliers of the converter. The converter is
// described as using a parallel-prefix adder; the choice of the Sklansky
// tree is this design's own. Purely combinational.
module prefix_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [L+1];
  logic [W-1:0] p [L+1];
  logic [W-1:0] hp;   // half-sum a ^ b
  logic [W:0]   c;    // carry into each bit

  always_comb begin
    hp   = a ^ b;
    g[0] = a & b;
    p[0] = hp;
    g[0][0] = (a[0] & b[0]) | (hp[0] & cin);
    for (int unsigned l = 0; l < L; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (((i >> l) & 1) == 1) begin
          // Combine with the last bit of the block just below bit i.
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][((i >> l) << l) - 1]);
          p[l+1][i] = p[l][i] & p[l][((i >> l) << l) - 1];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    c[0] = cin;
    for (int unsigned i = 0; i < W; i++) c[i+1] = g[L][i];
    sum  = hp ^ c[W-1:0];
    cout = c[W];
  end

endmodule
