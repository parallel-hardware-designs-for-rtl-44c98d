// tb_efg_core: checks the polynomial evaluator end to end: for random
// segments, xm and xl the pre-rounded result (1.40 fixed point, signed for
// the log2 segment) must lie within 2^-36 of the function at
// x0 + (xm + xl/2^15)/256, computed in double precision. Subinterval starts
// (xl = 0) must be within 2^-40.
module tb_efg_core;
  import efg_pkg::*;
  logic [2:0]  seg;
  logic [7:0]  xm;
  logic [14:0] xl;
  logic [40:0] sum;
  int checks = 0, failures = 0;

  efg_core dut (.seg(seg), .xm(xm), .xl(xl), .sum(sum));

  function automatic real fval(int s, real x);
    case (s)
      0: return 1.0 / x;
      1: return $sqrt(x);
      2: return $sqrt(2.0 * x);
      3: return $ln(x) / $ln(2.0);
      4: return (x == 1.0) ? 1.0 / $ln(2.0) : $ln(x) / ($ln(2.0) * (x - 1.0));
      5: return $pow(2.0, x);
      default: return $pow(2.0, -x);
    endcase
  endfunction

  initial begin
    for (int it = 0; it < 20000; it++) begin
      real x, fv, pv, tol;
      int s;
      s   = it % 7;
      seg = 3'(s);
      xm  = 8'($urandom);
      xl  = (it % 11 == 0) ? 15'd0 : (it % 13 == 0) ? '1 : 15'($urandom);
      #1;
      x  = ((s >= 5) ? 0.0 : 1.0) + (real'(xm) + real'(xl) / 32768.0) / 256.0;
      fv = fval(s, x);
      pv = (s == 3) ? real'(longint'(signed'(sum))) : real'(sum);
      pv = pv / $pow(2.0, 40.0);
      tol = (xl == 0) ? $pow(2.0, -40.0) : $pow(2.0, -36.0);
      checks++;
      if (pv - fv > tol || fv - pv > tol) begin
        failures++;
        if (failures < 10) $display("FAIL seg %0d xm %0d xl %0d: %.14f vs %.14f", s, xm, xl, pv, fv);
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
