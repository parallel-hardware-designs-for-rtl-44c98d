// multi_operand_adder: sum = a0 + t1 + t2 + t3 for the cubic polynomial.
//
// t1..t3 are the two's complement terms a1*xl, a2*xl^2, a3*xl^3, each
// narrower than the result. Following the source paper's Figure 8 they are
// not sign-extended: each enters with its sign bit inverted and zeros
// above, which adds 2^(w-1) per term; the table already stored a0 minus
// those constants (efg_pkg::SIGN_FOLD), so no extra hardware adds them.
// The four rows are reduced by carry-save adders and summed by a carry
// look-ahead adder; the result is taken modulo 2^W. Combinational.
module multi_operand_adder #(
  parameter int W  = 41,
  parameter int W1 = 37,
  parameter int W2 = 29,
  parameter int W3 = 20
) (
  input  logic [W-1:0]  a0f,   // a0 with the sign constants folded in
  input  logic [W1-1:0] t1,
  input  logic [W2-1:0] t2,
  input  logic [W3-1:0] t3,
  output logic [W-1:0]  sum
);
  logic [W-1:0] rows [4];
  logic [W-1:0] s, c;
  logic         unused_cout;

  always_comb begin
    rows[0] = a0f;
    rows[1] = W'({~t1[W1-1], t1[W1-2:0]});
    rows[2] = W'({~t2[W2-1], t2[W2-2:0]});
    rows[3] = W'({~t3[W3-1], t3[W3-2:0]});
  end

  csa_reduce #(.N(4), .W(W)) u_tree (.rows(rows), .out_s(s), .out_c(c));
  cla_adder  #(.W(W))        u_add  (.a(s), .b(c), .cin(1'b0), .sum(sum), .cout(unused_cout));
endmodule
