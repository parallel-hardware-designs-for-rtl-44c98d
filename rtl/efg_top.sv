// efg_top: elementary function generator for 1/x, sqrt(x), 2^x and log2(x)
// with a selectable IEEE rounding mode, single-precision significands.
//
// Operand x = (-1)^in_sx * in_mx * 2^in_ex, in_mx = 1.f with its leading
// one (24 bits), in_ex unbiased. Result (-1)^out_sy * out_my * 2^out_ey in
// the same form; out_zero marks an exact zero (log2(1)), out_err an operand
// outside the function's domain (sqrt or log2 of a negative number, 2^x
// with |x| >= 2^(EXP2_MAXE+1)), out_inexact a rounded result.
//
// Two pipeline stages, one operation accepted per cycle, no stalls:
//   stage 1  range_reduce_in, then efg_core (table, powers, multipliers
//            and multi-operand adder) -> pre-rounded result registered
//   stage 2  range_reduce_out (log2 exponent addition or ratio product)
//            and round_norm (normalize, round) -> result registered
// out_valid rises two clock edges after the in_valid cycle (LATENCY = 2).
// The algorithm, the table-driven polynomial and the range reductions are
// the source paper's; the two-stage division of the work, the handshake
// and the operand encoding are this design's choices. Reset is active-low
// and synchronous and clears only the valid bits.
module efg_top
  import efg_pkg::*;
#(
  parameter int EXP2_MAXE = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  func_e                in_func,
  input  rmode_e               in_rmode,
  input  logic                 in_sx,
  input  logic signed [EW-1:0] in_ex,
  input  logic [P-1:0]         in_mx,
  output logic                 out_valid,
  output logic                 out_sy,
  output logic signed [EW-1:0] out_ey,
  output logic [P-1:0]         out_my,
  output logic                 out_zero,
  output logic                 out_err,
  output logic                 out_inexact
);
  localparam int MW  = 64;
  localparam int EBW = 12;

  // ---------------- stage 1 ----------------
  logic [SEG_W-1:0] seg;
  logic [XM_W-1:0]  xm;
  logic [XL_W-1:0]  xl;
  side_t            side;
  logic [SUM_W-1:0] sum;

  range_reduce_in #(.EXP2_MAXE(EXP2_MAXE)) u_rin (
    .func(in_func), .rmode(in_rmode), .sx(in_sx), .ex(in_ex), .mx(in_mx),
    .seg(seg), .xm(xm), .xl(xl), .side(side));

  efg_core u_core (.seg(seg), .xm(xm), .xl(xl), .sum(sum));

  logic             s1_valid;
  side_t            s1_side;
  logic [SUM_W-1:0] s1_sum;

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
    if (in_valid) begin
      s1_side <= side;
      s1_sum  <= sum;
    end
  end

  // ---------------- stage 2 ----------------
  logic [MW-1:0]         mag;
  logic signed [EBW-1:0] ebias;
  logic                  sgn, zero;
  logic [P-1:0]          my;
  logic signed [EW-1:0]  ey;
  logic                  inexact;

  range_reduce_out #(.MW(MW), .EBW(EBW)) u_rout (
    .sum(s1_sum), .side(s1_side), .mag(mag), .ebias(ebias), .sign_y(sgn), .zero(zero));

  round_norm #(.MW(MW), .EBW(EBW)) u_round (
    .mag(mag), .ebias(ebias), .sign(sgn), .zero(zero), .rmode(s1_side.rmode),
    .my(my), .ey(ey), .inexact(inexact));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
    if (s1_valid) begin
      out_sy      <= sgn;
      out_ey      <= ey;
      out_my      <= my;
      out_zero    <= zero;
      out_err     <= s1_side.err;
      out_inexact <= inexact;
    end
  end
endmodule
