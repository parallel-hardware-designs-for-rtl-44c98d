// tc_mult: parallel multiplier, multiplicand NA bits (two's complement when
// A_SIGNED, else unsigned) times an unsigned NB-bit multiplier, with the
// product rounded to nearest by dropping its DROP low bits and kept as RW
// bits (sign-extended when RW exceeds what is left).
//
// Structure after the source paper's Figure 7: one partial product row per
// multiplier bit. Instead of sign-extending each row, the sign bit of every
// row is inverted and one constant row corrects the result; that constant
// holds the "one added to the N-th column" of the paper, the top-column
// bit that completes the identity, and here also the half-LSB used for
// rounding. The rows are reduced to two by a Wallace tree of carry-save
// adders (csa_reduce) and added by a carry look-ahead adder (cla_adder).
// Rounding by a constant added in the tree is this design's choice; the
// paper states only that products are rounded. Purely combinational.
module tc_mult #(
  parameter int NA       = 35,
  parameter int NB       = 15,
  parameter bit A_SIGNED = 1'b1,
  parameter int DROP     = 16,
  parameter int RW       = 37
) (
  input  logic [NA-1:0] a,
  input  logic [NB-1:0] b,
  output logic [RW-1:0] p
);
  // tree width: whole product, or more when RW asks for extra sign bits
  localparam int TW = (NA + NB > DROP + RW) ? NA + NB : DROP + RW;

  function automatic logic [TW-1:0] const_row();
    logic [TW-1:0] k;
    k = '0;
    if (A_SIGNED)
      // 2^(NA-1) - 2^(NA+NB-1), modulo 2^TW
      k = (TW'(1) << (NA-1)) - (TW'(1) << (NA+NB-1));
    if (DROP > 0)
      k = k + (TW'(1) << (DROP > 0 ? DROP-1 : 0));
    return k;
  endfunction
  localparam logic [TW-1:0] KROW = const_row();

  logic [TW-1:0] rows [NB+1];
  logic [TW-1:0] s, c, full;
  logic          unused_cout;

  always_comb begin
    for (int j = 0; j < NB; j++) begin
      logic [NA-1:0] pp;
      pp = a & {NA{b[j]}};
      if (A_SIGNED) pp[NA-1] = ~pp[NA-1];
      rows[j] = TW'(pp) << j;
    end
    rows[NB] = KROW;
  end

  csa_reduce #(.N(NB+1), .W(TW)) u_tree (.rows(rows), .out_s(s), .out_c(c));
  cla_adder  #(.W(TW))           u_add  (.a(s), .b(c), .cin(1'b0), .sum(full), .cout(unused_cout));

  assign p = full[DROP +: RW];

  logic unused;
  assign unused = ^{unused_cout, full};
endmodule
