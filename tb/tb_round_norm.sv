// tb_round_norm: checks normalization and rounding on random magnitudes of
// every length up to 64 bits, random exponent offsets, both signs and all
// four rounding modes. The reference truncates the magnitude to 24 bits by
// division, decides the rounding from the remainder compared with half a
// unit, and renormalizes a carry out.
module tb_round_norm;
  import efg_pkg::*;
  logic [63:0] mag;
  logic signed [11:0] ebias;
  logic sign, zero;
  rmode_e rmode;
  logic [23:0] my;
  logic signed [9:0] ey;
  logic inexact;
  int checks = 0, failures = 0, carries = 0;

  round_norm dut (.mag(mag), .ebias(ebias), .sign(sign), .zero(zero), .rmode(rmode),
                  .my(my), .ey(ey), .inexact(inexact));

  initial begin
    for (int it = 0; it < 20000; it++) begin
      int nb, e_exp, sh;
      logic [63:0] q, r, half, m;
      logic up;
      nb    = 1 + (it % 64);
      m     = {$urandom, $urandom};
      if (it % 9 == 0) m = '1;                 // forces carries
      m     = (nb == 64) ? m : (m & ((64'd1 << nb) - 1));
      m[nb-1] = 1'b1;
      mag   = m;
      ebias = 12'($urandom_range(0, 200)) - 12'sd100;
      sign  = 1'($urandom);
      zero  = 1'b0;
      rmode = rmode_e'($urandom_range(0, 3));
      #1;
      // reference
      sh = (nb > 24) ? nb - 24 : 0;
      if (sh > 0) begin
        q    = m / (64'd1 << sh);
        r    = m % (64'd1 << sh);
        half = 64'd1 << (sh - 1);
      end else begin
        q    = m << (24 - nb);
        r    = '0;
        half = 64'd1;
      end
      case (rmode)
        RM_RNE:  up = (r > half) || (r == half && q[0]);
        RM_RPI:  up = !sign && r != 0;
        RM_RMI:  up = sign && r != 0;
        default: up = 1'b0;
      endcase
      e_exp = int'(ebias) + nb - 1;
      q = q + 64'(up);
      if (q == 64'd1 << 24) begin
        q = 64'd1 << 23;
        e_exp++;
        carries++;
      end
      checks++;
      if (my != q[23:0] || int'(ey) != e_exp || inexact != (r != 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL mag=%h eb=%0d s=%0d rm=%0d: %h e%0d, expected %h e%0d",
                   mag, ebias, sign, rmode, my, ey, q[23:0], e_exp);
      end
    end
    zero = 1'b1; mag = '0;
    #1;
    checks++;
    if (my != '0 || inexact) begin failures++; $display("FAIL zero"); end
    checks++;
    if (carries == 0) begin failures++; $display("FAIL no carry exercised"); end
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
