// square_unit: squaring circuit, y = x^2 rounded to its OW top bits.
//
// x is an unsigned XW-bit fraction (the low part xl of the operand), y the
// OW-bit fraction closest to x^2. A squarer needs about half the partial
// product bits of a multiplier: the products x_i*x_j and x_j*x_i are merged
// into one bit one column higher, and x_i*x_i is just x_i. Each row i holds
// x_i in column 2i and x_i & x_j (j > i) in column i+j+1. The rows and a
// half-LSB rounding constant are reduced by csa_reduce and added by
// cla_adder. The source paper gives the squarer's word lengths (15 bits in,
// 24 out for single precision) and that it is a dedicated circuit; the bit
// folding is this design's choice. Purely combinational.
module square_unit #(
  parameter int XW = 15,
  parameter int OW = 24
) (
  input  logic [XW-1:0] x,
  output logic [OW-1:0] y
);
  localparam int FW = 2*XW;
  localparam int D  = FW - OW;   // dropped low bits

  logic [FW-1:0] rows [XW+1];
  logic [FW-1:0] s, c, full;
  logic          unused_cout;

  always_comb begin
    for (int i = 0; i < XW; i++) begin
      rows[i] = '0;
      rows[i][2*i] = x[i];
      for (int j = i + 1; j < XW; j++)
        rows[i][i+j+1] = x[i] & x[j];
    end
    rows[XW] = (D > 0) ? (FW'(1) << (D > 0 ? D-1 : 0)) : '0;
  end

  csa_reduce #(.N(XW+1), .W(FW)) u_tree (.rows(rows), .out_s(s), .out_c(c));
  cla_adder  #(.W(FW))           u_add  (.a(s), .b(c), .cin(1'b0), .sum(full), .cout(unused_cout));

  assign y = full[D +: OW];

  logic unused;
  assign unused = ^{unused_cout, full};
endmodule
