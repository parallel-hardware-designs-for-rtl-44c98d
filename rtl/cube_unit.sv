// cube_unit: xl^3 for the cubic term, computed as xl * xl^2.
//
// The source paper's preferred single-precision design forms xl^3 by
// multiplying xl by the squarer's output rather than by a table look-up;
// it gives the cube's precision as 14 bits in and 14 bits out. Here the top
// IW bits of xl and the top IW bits of xl^2 are multiplied by an unsigned
// tc_mult and the product rounded to nearest at OW bits. Which bits are
// used is this design's choice. Purely combinational.
module cube_unit #(
  parameter int XW  = 15,   // width of xl
  parameter int SW  = 24,   // width of xl^2
  parameter int IW  = 14,   // bits of each factor used
  parameter int OW  = 14    // bits of xl^3 produced
) (
  input  logic [XW-1:0] xl,
  input  logic [SW-1:0] xl2,
  output logic [OW-1:0] xl3
);
  logic [IW-1:0] xa, xb;
  assign xa = xl[XW-1 -: IW];
  assign xb = xl2[SW-1 -: IW];

  tc_mult #(.NA(IW), .NB(IW), .A_SIGNED(1'b0), .DROP(2*IW-OW), .RW(OW))
    u_mul (.a(xa), .b(xb), .p(xl3));

  logic unused;
  assign unused = ^{xl[XW-IW-1:0], xl2[SW-IW-1:0]};
endmodule
