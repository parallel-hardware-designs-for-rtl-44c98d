// tb_tc_mult: checks the parallel multiplier in the generator's three term
// configurations (35x15, 27x24, 18x14, signed multiplicand) and as an
// unsigned 14x14 multiplier. The expected value is the exact product,
// rounded to nearest (half up) at bit DROP and cut to RW bits.
module tb_tc_mult;
  int checks = 0, failures = 0;

  logic [34:0] a1; logic [14:0] b1; logic [36:0] p1;
  logic [26:0] a2; logic [23:0] b2; logic [28:0] p2;
  logic [17:0] a3; logic [13:0] b3; logic [19:0] p3;
  logic [13:0] a4; logic [13:0] b4; logic [13:0] p4;

  tc_mult #(.NA(35), .NB(15), .A_SIGNED(1'b1), .DROP(16), .RW(37)) d1 (.a(a1), .b(b1), .p(p1));
  tc_mult #(.NA(27), .NB(24), .A_SIGNED(1'b1), .DROP(25), .RW(29)) d2 (.a(a2), .b(b2), .p(p2));
  tc_mult #(.NA(18), .NB(14), .A_SIGNED(1'b1), .DROP(14), .RW(20)) d3 (.a(a3), .b(b3), .p(p3));
  tc_mult #(.NA(14), .NB(14), .A_SIGNED(1'b0), .DROP(14), .RW(14)) d4 (.a(a4), .b(b4), .p(p4));

  // exact product, rounded at bit drop (add half, arithmetic shift)
  function automatic longint rounded(longint prod, int drop);
    return (prod + (longint'(1) << (drop - 1))) >>> drop;
  endfunction

  task automatic cmp(string name, longint got, longint exp_v, int rw);
    longint mask;
    mask = (longint'(1) << rw) - 1;
    checks++;
    if ((got & mask) != (exp_v & mask)) begin
      failures++;
      $display("FAIL %s got %h expected %h", name, got & mask, exp_v & mask);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a1 = 35'({$urandom, $urandom}); b1 = 15'($urandom);
      a2 = 27'($urandom);             b2 = 24'($urandom);
      a3 = 18'($urandom);             b3 = 14'($urandom);
      a4 = 14'($urandom);             b4 = 14'($urandom);
      if (i < 4) begin   // extremes
        a1 = (i[0]) ? {1'b1, 34'b0} : '1; b1 = '1;
        a2 = (i[0]) ? {1'b1, 26'b0} : {1'b0, {26{1'b1}}}; b2 = '1;
        a3 = (i[1]) ? {1'b1, 17'b0} : '0; b3 = '1;
        a4 = '1; b4 = '1;
      end
      #1;
      cmp("m1", longint'(p1), rounded(longint'(signed'(a1)) * longint'(b1), 16), 37);
      cmp("m2", longint'(p2), rounded(longint'(signed'(a2)) * longint'(b2), 25), 29);
      cmp("m3", longint'(p3), rounded(longint'(signed'(a3)) * longint'(b3), 14), 20);
      cmp("m4", longint'(p4), rounded(longint'(a4) * longint'(b4), 14), 14);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
