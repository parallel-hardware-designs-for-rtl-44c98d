// tb_cube_unit: checks xl^3 = top14(xl) * top14(xl^2) rounded to 14 bits,
// and that it stays within 2^-12 of the exact cube of xl, on random and
// extreme inputs. xl^2 is supplied exactly rounded as the squarer gives it.
module tb_cube_unit;
  logic [14:0] xl;
  logic [23:0] xl2;
  logic [13:0] xl3;
  int checks = 0, failures = 0;

  cube_unit #(.XW(15), .SW(24), .IW(14), .OW(14)) dut (.xl(xl), .xl2(xl2), .xl3(xl3));

  initial begin
    for (int i = 0; i < 6000; i++) begin
      longint e, sq;
      real    exact, got;
      xl  = (i == 0) ? '1 : (i == 1) ? '0 : 15'($urandom);
      sq  = (longint'(xl) * longint'(xl) + 32) >> 6;
      xl2 = 24'(sq);
      #1;
      e = ((longint'(xl) >> 1) * (sq >> 10) + (longint'(1) << 13)) >> 14;
      checks++;
      if (longint'(xl3) != e) begin
        failures++;
        $display("FAIL xl=%h got %h expected %h", xl, xl3, e);
      end
      exact = $pow(real'(xl) / 32768.0, 3.0);
      got   = real'(xl3) / 16384.0;
      checks++;
      if (got - exact > 1.0 / 4096.0 || exact - got > 1.0 / 4096.0) begin
        failures++;
        $display("FAIL accuracy xl=%h", xl);
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
