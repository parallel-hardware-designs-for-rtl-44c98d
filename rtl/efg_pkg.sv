// efg_pkg: shared types and sizes of the elementary function generator.
//
// The generator evaluates 1/x, sqrt(x), 2^x and log2(x) for a normalized
// number with a 24-bit significand (IEEE single precision) using a cubic
// polynomial per subinterval: p = a0 + a1*xl + a2*xl^2 + a3*xl^3, where the
// reduced operand is split into a high part xm (selects the coefficients)
// and a low part xl (the point inside the subinterval).
//
// The word lengths follow the single-precision cubic design of the source
// paper: coefficients of 41/35/27/18 bits (a 121-bit table word), a 15-bit
// xl, a 15-bit-in/24-bit-out squarer, a 14-bit cube, rounded products of
// 37/29/20 bits and a four-input adder of 41/37/29/20 bits. Where each
// word's binary point sits is this design's own choice, given by the *_F
// constants below (number of fraction bits).
package efg_pkg;

  // Operation select.
  typedef enum logic [1:0] {
    F_RECIP = 2'd0,
    F_SQRT  = 2'd1,
    F_EXP2  = 2'd2,
    F_LOG2  = 2'd3
  } func_e;

  // IEEE 754 rounding modes.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,   // round to nearest, ties to even
    RM_RPI = 2'd1,   // round toward +infinity
    RM_RMI = 2'd2,   // round toward -infinity
    RM_RZ  = 2'd3    // round toward zero
  } rmode_e;

  // Coefficient table segments: one approximated function each.
  typedef enum logic [2:0] {
    SEG_RECIP  = 3'd0,   // 1/x            on [1,2)
    SEG_SQRT_E = 3'd1,   // sqrt(x)        on [1,2)   (even exponent)
    SEG_SQRT_O = 3'd2,   // sqrt(2x)       on [1,2)   (odd exponent)
    SEG_LOG2   = 3'd3,   // log2(x)        on [1,2)
    SEG_LOG2R  = 3'd4,   // log2(x)/(x-1)  on [1,2)   (exponent zero)
    SEG_EXP2   = 3'd5,   // 2^x            on [0,1)
    SEG_EXP2N  = 3'd6,   // 2^-x           on [0,1)
    SEG_NONE   = 3'd7    // unused
  } seg_e;

  localparam int P      = 24;  // significand bits of operand and result
  localparam int FRAC_W = P-1; // fraction bits of the reduced operand
  localparam int EW     = 10;  // signed, unbiased exponent width
  localparam int SEG_W  = 3;
  localparam int XM_W   = 8;   // bits of xm: 256 subintervals per segment
  localparam int XL_W   = 15;  // bits of xl

  // Coefficient lengths and fraction bits (a0 unsigned, a1..a3 signed).
  localparam int A0_W = 41, A0_F = 40;
  localparam int A1_W = 35, A1_F = 41;
  localparam int A2_W = 27, A2_F = 41;
  localparam int A3_W = 18, A3_F = 40;
  localparam int WORD_W = A0_W + A1_W + A2_W + A3_W;   // 121

  // Powers of xl: xl has XL_W fraction bits, xl^2 SQ_W, xl^3 CU_W.
  localparam int SQ_W    = 24;
  localparam int CU_IN_W = 14;
  localparam int CU_W    = 14;

  // Rounded product widths; every term is aligned to 2^-SUM_F.
  localparam int SUM_F = 40;
  localparam int T1_W  = 37;
  localparam int T2_W  = 29;
  localparam int T3_W  = 20;
  localparam int SUM_W = A0_W;   // pre-rounded result: 1 integer + 40 fraction bits

  // Fig. 8 style sign handling: every signed term enters the adder with its
  // sign bit inverted; the resulting bias, -sum(2^(w-1)), is folded into a0
  // when the table is built.
  localparam logic [SUM_W-1:0] SIGN_FOLD =
      SUM_W'((64'd1 << (T1_W-1)) + (64'd1 << (T2_W-1)) + (64'd1 << (T3_W-1)));

  // Side information carried from input to output transformation.
  typedef struct packed {
    func_e                  func;
    rmode_e                 rmode;
    logic                   sign_y;    // sign of the result
    logic signed [EW-1:0]   ey;        // exponent E'_y of the table result
    logic signed [EW-1:0]   ex;        // log2: input exponent
    logic                   log2_ratio;// log2 with E_x = 0: ratio path
    logic [FRAC_W-1:0]      frac;      // log2 ratio path: fraction of M_x
    logic                   err;       // operand outside the function's domain
  } side_t;

endpackage
