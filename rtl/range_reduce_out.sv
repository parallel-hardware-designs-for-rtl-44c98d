// range_reduce_out: output transformation of the elementary function
// generator (source paper, Fig. 5 steps 3-4 and the log2 discussion).
//
// It turns the polynomial result into an exact unnormalized value
// mag * 2^ebias with a sign, which round_norm then normalizes and rounds:
//   1/x, sqrt, 2^x  mag is the pre-rounded result (1.40 fixed point) and
//                   ebias = E'_y - 40. The paper's step 4 (doubling a result
//                   below one and decrementing the exponent) is done by the
//                   leading-one normalization in round_norm.
//   log2, ex != 0   the exponent is added: v = ex + log2(mx) as a signed
//                   fixed-point number, sign and magnitude taken from v.
//   log2, ex == 0   the table gave g = log2(mx)/(mx-1) in [1, 1.45); it is
//                   multiplied by (mx-1) normalized to [1,2), and the shift
//                   used for that normalization goes into the exponent, so
//                   no leading zeros cost precision. mx = 1 gives zero.
// The ratio path's multiplier is a tc_mult in the second pipeline stage
// ("the next cycle" in the paper). Combinational.
module range_reduce_out
  import efg_pkg::*;
#(
  parameter int MW  = 64,   // width of mag
  parameter int EBW = 12    // width of ebias
) (
  input  logic [SUM_W-1:0]       sum,
  input  side_t                  side,
  output logic [MW-1:0]          mag,
  output logic signed [EBW-1:0]  ebias,
  output logic                   sign_y,
  output logic                   zero
);
  localparam int NW = FRAC_W;            // normalized (mx-1): 1.(NW-1)

  logic [$clog2(NW+1)-1:0] lz;
  logic [NW-1:0]           nrm;
  logic [A0_W+NW-1:0]      prod;
  logic signed [MW-1:0]    v;

  // leading zeros of the fraction, and the fraction shifted to bring its
  // leading one to the top
  always_comb begin
    lz = '0;
    for (int i = 0; i < NW; i++)
      if (side.frac[NW-1-i] == 1'b0 && lz == ($clog2(NW+1))'(i)) lz = lz + 1'b1;
    nrm = side.frac << lz;
  end

  tc_mult #(.NA(A0_W), .NB(NW), .A_SIGNED(1'b0), .DROP(0), .RW(A0_W+NW))
    u_ratio (.a(sum), .b(nrm), .p(prod));

  always_comb begin
    v      = MW'(signed'({side.ex, {A0_F{1'b0}}})) + MW'(signed'(sum));
    mag    = MW'(sum);
    ebias  = EBW'(side.ey) - EBW'(A0_F);
    sign_y = side.sign_y;
    zero   = (sum == '0);
    if (side.func == F_LOG2) begin
      if (side.log2_ratio) begin
        mag    = MW'(prod);
        ebias  = -EBW'(A0_F + NW - 1) - EBW'(lz) - EBW'(1);
        sign_y = 1'b0;
        zero   = (side.frac == '0);
      end else begin
        sign_y = v[MW-1];
        mag    = v[MW-1] ? MW'(-v) : MW'(v);
        ebias  = -EBW'(A0_F);
        zero   = (v == '0);
      end
    end
  end

  // rounding mode and error flag go straight to the rounder and the output
  logic unused;
  assign unused = ^{side.rmode, side.err};
endmodule
