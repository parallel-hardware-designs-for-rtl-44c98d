// tb_multi_operand_adder: checks that a0 plus three two's complement terms
// is formed correctly when a0 arrives with the sign constants already
// subtracted (the folding the coefficient table does), on random values.
module tb_multi_operand_adder;
  import efg_pkg::*;
  logic [40:0] a0f, sum;
  logic [36:0] t1;
  logic [28:0] t2;
  logic [19:0] t3;
  int checks = 0, failures = 0;

  multi_operand_adder #(.W(41), .W1(37), .W2(29), .W3(20))
    dut (.a0f(a0f), .t1(t1), .t2(t2), .t3(t3), .sum(sum));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint a0, e;
      a0 = longint'({$urandom, $urandom}) & ((longint'(1) << 41) - 1);
      t1 = 37'({$urandom, $urandom});
      t2 = 29'($urandom);
      t3 = 20'($urandom);
      a0f = 41'(a0) - SIGN_FOLD;
      #1;
      e = a0 + longint'(signed'(t1)) + longint'(signed'(t2)) + longint'(signed'(t3));
      checks++;
      if (sum != 41'(e)) begin
        failures++;
        $display("FAIL got %h expected %h", sum, 41'(e));
      end
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
