// range_reduce_in: input transformation of the elementary function generator.
//
// The operand is x = (-1)^sx * mx * 2^ex with mx = 1.f (24 bits, hidden one
// included) and ex an unbiased signed exponent. The block brings it into
// the interval on which a table segment approximates the function, and
// splits the reduced fraction into xm (its top XM_W bits, the subinterval)
// and xl (the rest, the point inside it), as in the source paper's Fig. 1
// and Fig. 5, steps 1-2:
//   1/x     segment 1/x on mx, E'_y = -ex, sign kept.
//   sqrt    even ex: sqrt(mx), E'_y = ex/2; odd ex: sqrt(2 mx) from its
//           own segment, E'_y = (ex-1)/2. A negative operand is an error.
//   2^x     |x| is split by a shifter into integer I and fraction F (23
//           bits, lower bits truncated). x >= 0: 2^F, E'_y = I. x < 0:
//           2^-F from its own segment, E'_y = -I. |x| >= 2^(EXP2_MAXE+1)
//           is flagged as out of range.
//   log2    ex != 0: log2(mx) segment, the exponent is added afterwards.
//           ex == 0: the log2(x)/(x-1) segment, multiplied by (x-1) in the
//           output transformation. A negative operand is an error.
// The side information for the output transformation is packed in side_t.
// Combinational.
module range_reduce_in
  import efg_pkg::*;
#(
  parameter int EXP2_MAXE = 7   // largest ex accepted by 2^x
) (
  input  func_e              func,
  input  rmode_e             rmode,
  input  logic               sx,
  input  logic signed [EW-1:0] ex,
  input  logic [P-1:0]       mx,
  output logic [SEG_W-1:0]   seg,
  output logic [XM_W-1:0]    xm,
  output logic [XL_W-1:0]    xl,
  output side_t              side
);
  localparam int IW = EXP2_MAXE + 1;   // integer bits of |x| for 2^x

  logic [FRAC_W-1:0]   f;          // reduced fraction fed to the table
  logic [IW+FRAC_W-1:0] xfix;      // |x| as fixed point, FRAC_W fraction bits
  logic [IW-1:0]       xint;
  logic [FRAC_W-1:0]   xfrac;
  int                  sh;

  always_comb begin
    // fixed-point |x| for 2^x: mx << ex, or mx >> -ex (truncating)
    sh = int'(ex);
    if (sh >= 0) xfix = (IW+FRAC_W)'(mx) << (sh > IW-1 ? IW-1 : sh);
    else         xfix = (IW+FRAC_W)'(mx) >> (-sh > P ? P : -sh);
    xint  = xfix[IW+FRAC_W-1 -: IW];
    xfrac = xfix[FRAC_W-1:0];

    side            = '0;
    side.func       = func;
    side.rmode      = rmode;
    side.ex         = ex;
    side.frac       = mx[FRAC_W-1:0];
    f               = mx[FRAC_W-1:0];
    seg             = SEG_NONE;

    unique case (func)
      F_RECIP: begin
        seg         = SEG_RECIP;
        side.sign_y = sx;
        side.ey     = -ex;
      end
      F_SQRT: begin
        seg         = ex[0] ? SEG_SQRT_O : SEG_SQRT_E;
        side.sign_y = 1'b0;
        side.ey     = ex >>> 1;      // floor(ex/2) covers both parities
        side.err    = sx;
      end
      F_EXP2: begin
        f           = xfrac;
        side.sign_y = 1'b0;
        side.err    = (sh > EXP2_MAXE);
        if (!sx) begin
          seg     = SEG_EXP2;
          side.ey = EW'(signed'({1'b0, xint}));
        end else begin
          seg     = SEG_EXP2N;
          side.ey = -EW'(signed'({1'b0, xint}));
        end
      end
      F_LOG2: begin
        side.err        = sx;
        side.log2_ratio = (ex == '0);
        seg             = (ex == '0) ? SEG_LOG2R : SEG_LOG2;
        side.sign_y     = ex[EW-1];  // final sign is set after the addition
        side.ey         = '0;
      end
      default: ;
    endcase
  end

  assign xm = f[FRAC_W-1 -: XM_W];
  assign xl = f[XL_W-1:0];

  logic unused;
  assign unused = mx[P-1];
endmodule
