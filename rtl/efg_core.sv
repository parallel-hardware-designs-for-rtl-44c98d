// efg_core: the polynomial evaluator of the source paper's Figure 6.
//
// From the segment and the two parts xm, xl of the reduced operand it
// forms p = a0 + a1*xl + a2*xl^2 + a3*xl^3 in three steps that all run in
// parallel: (1) the coefficients are read from coef_rom while square_unit
// and cube_unit form xl^2 and xl^3 (xl^3 = xl * xl^2, the smaller of the
// paper's two cubic designs); (2) three tc_mult multipliers form the terms,
// each rounded at 2^-40; (3) multi_operand_adder sums them. The result
// has 1 integer and 40 fraction bits; for the log2 segment it is read as a
// signed number, for the others as unsigned. Word lengths are those of
// efg_pkg. Purely combinational: the generator registers around it.
module efg_core
  import efg_pkg::*;
(
  input  logic [SEG_W-1:0] seg,
  input  logic [XM_W-1:0]  xm,
  input  logic [XL_W-1:0]  xl,
  output logic [SUM_W-1:0] sum
);
  logic [A0_W-1:0] a0f;
  logic [A1_W-1:0] a1;
  logic [A2_W-1:0] a2;
  logic [A3_W-1:0] a3;
  logic [SQ_W-1:0] xl2;
  logic [CU_W-1:0] xl3;
  logic [T1_W-1:0] t1;
  logic [T2_W-1:0] t2;
  logic [T3_W-1:0] t3;

  coef_rom u_rom (.seg(seg), .xm(xm), .a0f(a0f), .a1(a1), .a2(a2), .a3(a3));

  square_unit #(.XW(XL_W), .OW(SQ_W)) u_sq (.x(xl), .y(xl2));

  cube_unit #(.XW(XL_W), .SW(SQ_W), .IW(CU_IN_W), .OW(CU_W))
    u_cube (.xl(xl), .xl2(xl2), .xl3(xl3));

  // product LSB is 2^-(coefficient fraction + power fraction); drop down to 2^-SUM_F
  tc_mult #(.NA(A1_W), .NB(XL_W), .A_SIGNED(1'b1), .DROP(A1_F + XL_W - SUM_F), .RW(T1_W))
    u_m1 (.a(a1), .b(xl), .p(t1));
  tc_mult #(.NA(A2_W), .NB(SQ_W), .A_SIGNED(1'b1), .DROP(A2_F + SQ_W - SUM_F), .RW(T2_W))
    u_m2 (.a(a2), .b(xl2), .p(t2));
  tc_mult #(.NA(A3_W), .NB(CU_W), .A_SIGNED(1'b1), .DROP(A3_F + CU_W - SUM_F), .RW(T3_W))
    u_m3 (.a(a3), .b(xl3), .p(t3));

  multi_operand_adder #(.W(SUM_W), .W1(T1_W), .W2(T2_W), .W3(T3_W))
    u_add (.a0f(a0f), .t1(t1), .t2(t2), .t3(t3), .sum(sum));
endmodule
