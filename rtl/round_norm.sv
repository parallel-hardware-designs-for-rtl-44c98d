// round_norm: normalization and correct rounding of the result.
//
// The input is an exact value (-1)^sign * mag * 2^ebias held in a wide
// unsigned mag. A leading-one detector finds the top set bit; the value is
// shifted so that bit leads a P-bit significand, and the bits below form a
// guard bit and a sticky bit. The significand is then rounded in one of
// the four IEEE 754 modes: to nearest even, toward +inf, toward -inf (the
// two directed modes act on the magnitude according to the sign) or
// toward zero. A carry out of the significand renormalizes it to 1.0 and
// increments the exponent. my is the result significand with its leading
// one (1.23 format), ey its unbiased exponent. Only the modes and their
// meaning come from the source paper; the structure is this design's.
// Combinational.
module round_norm
  import efg_pkg::*;
#(
  parameter int MW  = 64,
  parameter int EBW = 12
) (
  input  logic [MW-1:0]          mag,
  input  logic signed [EBW-1:0]  ebias,
  input  logic                   sign,
  input  logic                   zero,
  input  rmode_e                 rmode,
  output logic [P-1:0]           my,
  output logic signed [EW-1:0]   ey,
  output logic                   inexact
);
  logic [$clog2(MW)-1:0] msb;
  logic [MW-1:0]         norm;
  logic [P-1:0]          sig;
  logic                  grd, stk, up;
  logic [P:0]            rnd;
  logic signed [EBW-1:0] e;

  always_comb begin
    msb = '0;
    for (int i = 0; i < MW; i++)
      if (mag[i]) msb = ($clog2(MW))'(i);
    norm = mag << (($clog2(MW))'(MW-1) - msb);
    sig  = norm[MW-1 -: P];
    grd  = norm[MW-1-P];
    stk  = |norm[MW-2-P:0];
    unique case (rmode)
      RM_RNE:  up = grd & (stk | sig[0]);
      RM_RPI:  up = ~sign & (grd | stk);
      RM_RMI:  up = sign & (grd | stk);
      default: up = 1'b0;
    endcase
    rnd = {1'b0, sig} + (P+1)'(up);
    e   = ebias + EBW'(msb);
    if (rnd[P]) begin
      my = {1'b1, {(P-1){1'b0}}};
      e  = e + 1'b1;
    end else begin
      my = rnd[P-1:0];
    end
    ey      = EW'(e);
    inexact = grd | stk;
    if (zero) begin
      my      = '0;
      ey      = '0;
      inexact = 1'b0;
    end
  end
endmodule
