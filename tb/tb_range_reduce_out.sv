// tb_range_reduce_out: checks the output transformation. For the table
// functions mag * 2^ebias must equal the pre-rounded result times 2^E'_y;
// for log2 with a nonzero exponent it must equal ex + log2 part with the
// right sign; for log2 with exponent zero it must equal g * (mx - 1), the
// ratio times the fraction, and be zero for mx = 1. Values are compared in
// double precision, relative tolerance 2^-50.
module tb_range_reduce_out;
  import efg_pkg::*;
  logic [40:0] sum;
  side_t side;
  logic [63:0] mag;
  logic signed [11:0] ebias;
  logic sign_y, zero;
  int checks = 0, failures = 0;

  range_reduce_out dut (.sum(sum), .side(side), .mag(mag), .ebias(ebias),
                        .sign_y(sign_y), .zero(zero));

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    for (int it = 0; it < 6000; it++) begin
      real exp_v, got, sv;
      int  e;
      side = '0;
      side.rmode = RM_RNE;
      sum  = {$urandom, $urandom};
      e    = int'($urandom_range(0, 200)) - 100;
      case (it % 4)
        0: begin side.func = F_RECIP; side.ey = 10'(e); side.sign_y = 1'($urandom); end
        1: begin side.func = F_LOG2; side.ex = 10'(e == 0 ? 1 : e); end
        2: begin side.func = F_LOG2; side.ex = '0; side.log2_ratio = 1'b1;
                 side.frac = (it % 40 == 2) ? '0 : 23'($urandom >> ($urandom % 24)); end
        default: begin side.func = F_EXP2; side.ey = 10'(e); sum[40] = 1'b1; end
      endcase
      #1;
      sv = real'(sum) / $pow(2.0, 40.0);
      case (it % 4)
        1: begin
          sv    = real'(longint'(signed'(sum))) / $pow(2.0, 40.0);
          exp_v = real'(int'(side.ex)) + sv;
        end
        2: exp_v = sv * real'(side.frac) / 8388608.0;
        default: exp_v = sv * $pow(2.0, real'(e));
      endcase
      got = real'(mag) * $pow(2.0, real'(int'(ebias)));
      if (sign_y) got = -got;
      if (it % 4 == 0 && side.sign_y) exp_v = -exp_v;
      checks++;
      if (exp_v == 0.0 ? !zero : (zero || absr(got - exp_v) > absr(exp_v) * $pow(2.0, -50.0))) begin
        failures++;
        if (failures < 10) $display("FAIL case %0d: got %g expected %g", it % 4, got, exp_v);
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
