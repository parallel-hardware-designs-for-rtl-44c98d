// csa_reduce: Wallace-style reduction of N operands of W bits to two.
//
// Rows of 3:2 carry-save adders ("pseudo adders" in the source paper's
// words) work in parallel: each level turns every group of three operands
// into a sum and a shifted carry vector and passes the one or two left
// over, until two remain, whose sum equals the sum of all inputs modulo
// 2^W. The number of operands per level is fixed at elaboration, so the
// tree is plain wiring and full adders; its depth grows with log1.5(N).
// Combinational; the two outputs go to a carry look-ahead adder.
module csa_reduce #(
  parameter int N = 4,
  parameter int W = 41
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] out_s,
  output logic [W-1:0] out_c
);
  // operands left after l levels
  function automatic int count_at(int l);
    int c;
    c = N;
    for (int i = 0; i < l; i++)
      if (c > 2) c = 2 * (c / 3) + (c % 3);
    return c;
  endfunction

  function automatic int levels();
    int l;
    l = 0;
    while (count_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NL = levels();

  // level l reads the operands of level l-1 and drives its own array
  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    localparam int C = count_at(l);
    logic [W-1:0] v [C];
    if (l == 0) begin : g_first
      for (genvar i = 0; i < C; i++) begin : g_in
        assign v[i] = rows[i];
      end
    end else begin : g_next
      localparam int CP = count_at(l - 1);
      localparam int G  = CP / 3;
      for (genvar g = 0; g < G; g++) begin : g_csa
        logic [W-1:0] x, y, z;
        assign x = g_lvl[l-1].v[3*g];
        assign y = g_lvl[l-1].v[3*g+1];
        assign z = g_lvl[l-1].v[3*g+2];
        assign v[2*g]   = x ^ y ^ z;
        assign v[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (genvar k = 0; k < CP - 3*G; k++) begin : g_pass
        assign v[2*G+k] = g_lvl[l-1].v[3*G+k];
      end
    end
  end

  if (N >= 2) begin : g_two
    assign out_s = g_lvl[NL].v[0];
    assign out_c = g_lvl[NL].v[1];
  end else begin : g_one
    assign out_s = g_lvl[NL].v[0];
    assign out_c = '0;
  end
endmodule
