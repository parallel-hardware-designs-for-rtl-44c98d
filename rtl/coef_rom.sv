// coef_rom: coefficient table of the polynomial evaluator.
//
// One 121-bit word {a0f, a1, a2, a3} per subinterval, addressed by the
// segment (which function, see efg_pkg::seg_e) and xm, the top XM_W
// fraction bits of the reduced operand. The read is combinational.
//
// The contents are computed when the design is elaborated, by the
// procedure of the source paper's Section 2, for each subinterval
// [x0, x0 + h):
//   1. the NT Chebyshev nodes t_i = cos((2i+1)pi/(2NT)) on [-1,1);
//   2. mapped to u_i = (t_i+1)/2 in units of the subinterval, so that the
//      polynomial is directly in xl in [0,1);
//   3. the Lagrange polynomial through y_i = f(x0 + u_i*h);
//   4. expanded into powers of xl;
//   5. each coefficient rounded to its word length, ties to even.
// Two choices are this design's own. a0 is then replaced by f(x0), so that
// the result is exact wherever f at a subinterval start is representable
// (1/1, sqrt(1), 2^0, log2(1) and similar), which keeps directed rounding
// right on those points. And a0 is stored minus the adder's sign constant
// (Figure 8 of the paper). The paper goes on to adjust every coefficient by
// an exhaustive search over all inputs until each result rounds correctly;
// that search is not reproduced here, so these are the unadjusted
// Chebyshev coefficients and a small fraction of results may be off by one
// unit in the last place.
module coef_rom
  import efg_pkg::*;
#(
  parameter int NSEG = 8,
  parameter int XMW  = XM_W
) (
  input  logic [SEG_W-1:0] seg,
  input  logic [XMW-1:0]   xm,
  output logic [A0_W-1:0]  a0f,
  output logic [A1_W-1:0]  a1,
  output logic [A2_W-1:0]  a2,
  output logic [A3_W-1:0]  a3
);
  localparam int NT    = 4;             // terms of the cubic
  localparam int DEPTH = NSEG << XMW;
  localparam real PI   = 3.14159265358979323846;
  localparam real LN2  = 0.69314718055994530942;

  typedef logic [WORD_W-1:0] word_t;

  // function approximated by a segment, on its reduced argument
  function automatic real fseg(seg_e s, real x);
    case (s)
      SEG_RECIP:  return 1.0 / x;
      SEG_SQRT_E: return $sqrt(x);
      SEG_SQRT_O: return $sqrt(2.0 * x);
      SEG_LOG2:   return $ln(x) / LN2;
      SEG_LOG2R:  return (x == 1.0) ? 1.0 / LN2 : $ln(x) / (LN2 * (x - 1.0));
      SEG_EXP2:   return $pow(2.0, x);
      SEG_EXP2N:  return $pow(2.0, -x);
      default:    return 0.0;
    endcase
  endfunction

  // round r * 2^f to the nearest integer, ties to even
  function automatic longint rne(real r, int f);
    real    v, fl;
    longint n;
    v  = r * (2.0 ** f);
    fl = $floor(v);
    n  = longint'(fl);
    if (v - fl > 0.5) n = n + 1;
    else if (v - fl == 0.5 && n[0]) n = n + 1;
    return n;
  endfunction

  function automatic word_t coef_word(int idx);
    seg_e   s;
    int     m;
    real    x0, h;
    real    u [NT];
    real    y [NT];
    real    c [NT];
    real    l [NT];
    real    den;
    logic [A0_W-1:0] w0;
    logic [A1_W-1:0] w1;
    logic [A2_W-1:0] w2;
    logic [A3_W-1:0] w3;
    s  = seg_e'(idx >> XMW);
    m  = idx % (1 << XMW);
    h  = 1.0 / (2.0 ** XMW);
    x0 = ((s == SEG_EXP2 || s == SEG_EXP2N) ? 0.0 : 1.0) + m * h;
    if (s >= SEG_NONE) return '0;
    for (int i = 0; i < NT; i++) begin
      u[i] = ($cos((2.0 * i + 1.0) * PI / (2.0 * NT)) + 1.0) / 2.0;
      y[i] = fseg(s, x0 + u[i] * h);
      c[i] = 0.0;
    end
    // Lagrange basis polynomials expanded into powers of xl
    for (int i = 0; i < NT; i++) begin
      for (int d = 0; d < NT; d++) l[d] = 0.0;
      l[0] = 1.0;
      den  = 1.0;
      for (int j = 0; j < NT; j++) begin
        if (j != i) begin
          for (int d = NT-1; d > 0; d--) l[d] = l[d-1] - u[j] * l[d];
          l[0] = -u[j] * l[0];
          den  = den * (u[i] - u[j]);
        end
      end
      for (int d = 0; d < NT; d++) c[d] = c[d] + y[i] * l[d] / den;
    end
    c[0] = fseg(s, x0);
    w0 = A0_W'(rne(c[0], A0_F)) - SIGN_FOLD;
    w1 = A1_W'(rne(c[1], A1_F));
    w2 = A2_W'(rne(c[2], A2_F));
    w3 = A3_W'(rne(c[3], A3_F));
    return {w0, w1, w2, w3};
  endfunction

  function automatic word_t [DEPTH-1:0] build_table();
    for (int i = 0; i < DEPTH; i++) build_table[i] = coef_word(i);
  endfunction

  localparam word_t [DEPTH-1:0] TABLE = build_table();

  word_t word;
  assign word = TABLE[{seg, xm}];
  assign {a0f, a1, a2, a3} = word;
endmodule
