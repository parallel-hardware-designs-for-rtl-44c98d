// tb_square_unit: checks the 15-bit squarer against x*x rounded to its top
// 24 bits (half up), exhaustively over all 2^15 inputs.
module tb_square_unit;
  logic [14:0] x;
  logic [23:0] y;
  int checks = 0, failures = 0;

  square_unit #(.XW(15), .OW(24)) dut (.x(x), .y(y));

  initial begin
    for (int i = 0; i < (1 << 15); i++) begin
      longint e;
      x = 15'(i);
      #1;
      e = (longint'(i) * longint'(i) + 32) >> 6;
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%h expected %h", i, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
