// tb_csa_reduce: checks that the two outputs of the carry-save tree add up
// to the sum of all its operands modulo 2^W, for 16 random operands (the
// row count of the 15-bit multiplier) and for small operand counts.
module tb_csa_reduce;
  localparam int W = 50;
  int checks = 0, failures = 0;

  logic [W-1:0] r16 [16];
  logic [W-1:0] s16, c16;
  logic [W-1:0] r3 [3];
  logic [W-1:0] s3, c3;
  logic [W-1:0] r2 [2];
  logic [W-1:0] s2, c2;

  csa_reduce #(.N(16), .W(W)) d16 (.rows(r16), .out_s(s16), .out_c(c16));
  csa_reduce #(.N(3),  .W(W)) d3  (.rows(r3),  .out_s(s3),  .out_c(c3));
  csa_reduce #(.N(2),  .W(W)) d2  (.rows(r2),  .out_s(s2),  .out_c(c2));

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [W-1:0] e16, e3, e2;
      e16 = '0; e3 = '0; e2 = '0;
      for (int i = 0; i < 16; i++) begin
        r16[i] = W'({$urandom, $urandom});
        if (it % 5 == 0) r16[i] = '1;
        e16 += r16[i];
      end
      for (int i = 0; i < 3; i++) begin r3[i] = W'({$urandom, $urandom}); e3 += r3[i]; end
      for (int i = 0; i < 2; i++) begin r2[i] = W'({$urandom, $urandom}); e2 += r2[i]; end
      #1;
      checks += 3;
      if (s16 + c16 != e16) begin failures++; $display("FAIL N=16"); end
      if (s3 + c3 != e3)    begin failures++; $display("FAIL N=3"); end
      if (s2 + c2 != e2)    begin failures++; $display("FAIL N=2"); end
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
