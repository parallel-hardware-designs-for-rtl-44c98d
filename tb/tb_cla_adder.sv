// tb_cla_adder: checks the carry look-ahead adder against the + operator
// on random operands (including all-ones operands that ripple a carry
// through every bit), sum and carry-out, at the generator's 41-bit width.
module tb_cla_adder;
  localparam int W = 41;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check();
    logic [W:0] exp_v;
    #1;
    exp_v = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} != exp_v) begin
      failures++;
      $display("FAIL %h + %h + %b = %b%h, expected %h", a, b, cin, cout, sum, exp_v);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    for (int i = 0; i < 5000; i++) begin
      a   = {$urandom, $urandom};
      b   = {$urandom, $urandom};
      cin = 1'($urandom);
      if (i % 7 == 0) b = ~a;
      check();
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
