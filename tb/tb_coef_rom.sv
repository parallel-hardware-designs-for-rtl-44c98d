// tb_coef_rom: checks the coefficient table through what it is for. For
// every function segment and random subintervals, the cubic built from the
// stored coefficients (a0 with the adder's sign constant added back) is
// evaluated in double precision at several points of the subinterval and
// compared with the function itself: it must be within 2^-37, and at the
// subinterval start within 2^-40. The unused segment must hold an
// all-zero word.
module tb_coef_rom;
  import efg_pkg::*;
  logic [2:0]  seg;
  logic [7:0]  xm;
  logic [40:0] a0f;
  logic [34:0] a1;
  logic [26:0] a2;
  logic [17:0] a3;
  int checks = 0, failures = 0;

  coef_rom dut (.seg(seg), .xm(xm), .a0f(a0f), .a1(a1), .a2(a2), .a3(a3));

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

  function automatic real p2(int e);
    return $pow(2.0, real'(e));
  endfunction

  initial begin
    real u [4];
    u = '{0.0, 0.3, 0.71, 0.99997};
    for (int it = 0; it < 1200; it++) begin
      real c0, c1, c2, c3, x0, pv, fv, tol;
      logic [40:0] a0;
      int s;
      s   = it % 7;
      seg = 3'(s);
      xm  = (it < 14) ? ((it < 7) ? 8'd0 : 8'd255) : 8'($urandom);
      #1;
      a0 = a0f + SIGN_FOLD;
      c0 = real'(a0) * p2(-40);
      c1 = real'(longint'(signed'(a1))) * p2(-41);
      c2 = real'(longint'(signed'(a2))) * p2(-41);
      c3 = real'(longint'(signed'(a3))) * p2(-40);
      x0 = ((s >= 5) ? 0.0 : 1.0) + real'(xm) / 256.0;
      foreach (u[k]) begin
        pv  = c0 + u[k] * (c1 + u[k] * (c2 + u[k] * c3));
        fv  = fval(s, x0 + u[k] / 256.0);
        tol = (k == 0) ? p2(-40) : p2(-37);
        checks++;
        if (pv - fv > tol || fv - pv > tol) begin
          failures++;
          $display("FAIL seg %0d xm %0d u %f: p=%.15f f=%.15f", s, xm, u[k], pv, fv);
        end
      end
    end
    seg = 3'd7; xm = 8'd5;
    #1;
    checks++;
    if (a0f != '0 || a1 != '0 || a2 != '0 || a3 != '0) begin
      failures++;
      $display("FAIL unused segment not zero");
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
