// tb_range_reduce_in: checks the input transformation for random operands
// of all four functions: the segment chosen, the split of the reduced
// fraction into xm and xl, the result sign and exponent E'_y and the error
// flag. For 2^x the integer and fraction parts of |x| are worked out in
// double precision and compared with the shifter's.
module tb_range_reduce_in;
  import efg_pkg::*;
  func_e   func;
  rmode_e  rmode;
  logic    sx;
  logic signed [9:0] ex;
  logic [23:0] mx;
  logic [2:0]  seg;
  logic [7:0]  xm;
  logic [14:0] xl;
  side_t       side;
  int checks = 0, failures = 0;

  range_reduce_in dut (.func(func), .rmode(rmode), .sx(sx), .ex(ex), .mx(mx),
                       .seg(seg), .xm(xm), .xl(xl), .side(side));

  task automatic expect_eq(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL f=%0d ex=%0d mx=%h: %s = %0d, expected %0d", func, ex, mx, what, got, exp_v);
    end
  endtask

  initial begin
    for (int it = 0; it < 8000; it++) begin
      int e, eseg, ey, f, ierr;
      real ax, ip;
      func  = func_e'(it % 4);
      rmode = rmode_e'($urandom_range(0, 3));
      sx    = 1'($urandom);
      e     = (func == F_EXP2) ? int'($urandom_range(0, 34)) - 25 : int'($urandom_range(0, 120)) - 60;
      if (it % 17 == 0) e = 0;
      ex = 10'(e);
      mx = {1'b1, 23'($urandom)};
      #1;
      f    = int'(mx[22:0]);
      ierr = 0;
      case (func)
        F_RECIP: begin eseg = 0; ey = -e; end
        F_SQRT:  begin
          eseg = (e % 2 != 0) ? 2 : 1;
          ey   = int'($floor(real'(e) / 2.0));
          ierr = sx;
        end
        F_EXP2: begin
          ax   = real'(mx) * $pow(2.0, real'(e - 23));
          ip   = $floor(ax);
          f    = int'($floor((ax - ip) * 8388608.0));
          eseg = sx ? 6 : 5;
          ey   = sx ? -int'(ip) : int'(ip);
          ierr = (e > 7);
        end
        default: begin
          eseg = (e == 0) ? 4 : 3;
          ey   = 0;
          ierr = sx;
          expect_eq("log2_ratio", longint'(side.log2_ratio), longint'(e == 0));
          expect_eq("frac", longint'(side.frac), longint'(mx[22:0]));
          expect_eq("ex", longint'(side.ex), longint'(e));
        end
      endcase
      expect_eq("err", longint'(side.err), longint'(ierr));
      expect_eq("rmode", longint'(side.rmode), longint'(rmode));
      if (!ierr) begin
        expect_eq("seg", longint'(seg), longint'(eseg));
        expect_eq("xm", longint'(xm), longint'(f >> 15));
        expect_eq("xl", longint'(xl), longint'(f & 32'h7fff));
        if (func != F_LOG2) expect_eq("ey", longint'(side.ey), longint'(ey));
        if (func == F_RECIP) expect_eq("sign", longint'(side.sign_y), longint'(sx));
        if (func == F_SQRT || func == F_EXP2) expect_eq("sign", longint'(side.sign_y), 0);
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
