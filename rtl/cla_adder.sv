// cla_adder: W-bit carry look-ahead adder, sum = a + b + cin.
//
// The final adder after every carry-save reduction in the generator. The
// carries are formed with a parallel-prefix (Kogge-Stone) network of
// generate/propagate pairs, so the delay grows with log2(W). The source
// paper names a carry look-ahead adder without giving its structure; the
// prefix network is this design's choice. Purely combinational.
module cla_adder #(
  parameter int W = 41
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int LV = (W <= 1) ? 1 : $clog2(W);

  logic [W-1:0] g0, p0;
  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];
  logic [W:0]   c;

  always_comb begin
    g0 = a & b;
    p0 = a ^ b;
    // bit 0 absorbs the carry-in
    g[0] = g0;
    p[0] = p0;
    g[0][0] = g0[0] | (p0[0] & cin);
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
          p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    c[0] = cin;
    for (int i = 0; i < W; i++) c[i+1] = g[LV][i];
    sum  = p0 ^ c[W-1:0];
    cout = c[W];
  end
endmodule
