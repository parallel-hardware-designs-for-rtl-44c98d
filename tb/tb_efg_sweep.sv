// tb_efg_sweep: accuracy sweep of the generator over the whole reduced
// input interval of each function, the evaluation the design was sized
// for. For every function and every rounding mode, significands M in [1,2)
// are stepped with a fixed stride (STRIDE) at a fixed exponent (1/x and
// sqrt: E = 0 and E = 1; 2^x: x in [0.5,1) and (-1,-0.5]; log2: E = 0 and
// E = 5), streamed back to back through the pipeline and compared with a
// double-precision reference rounded in the same mode. Every result must
// be within one ulp; the number that are not correctly rounded is printed
// per function and must stay below 0.1%.
module tb_efg_sweep;
  import efg_pkg::*;

  localparam int STRIDE = 127;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  func_e                in_func;
  rmode_e               in_rmode;
  logic                 in_sx;
  logic signed [EW-1:0] in_ex;
  logic [P-1:0]         in_mx;
  logic                 out_valid, out_sy, out_zero, out_err, out_inexact;
  logic signed [EW-1:0] out_ey;
  logic [P-1:0]         out_my;

  efg_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int total [4], wrong [4];

  typedef struct {
    func_e  f;
    rmode_e rm;
    logic   sx;
    int     ex;
    int     mx;
  } op_t;
  op_t q [$];

  // ---------------- reference model ----------------
  function automatic real p2(int e);
    return $pow(2.0, real'(e));
  endfunction

  function automatic real opval(op_t o);
    return (o.sx ? -1.0 : 1.0) * real'(o.mx) * p2(o.ex - 23);
  endfunction

  function automatic real fref(op_t o);
    real x;
    x = opval(o);
    case (o.f)
      F_RECIP: return 1.0 / x;
      F_SQRT:  return $sqrt(x);
      F_EXP2:  return $pow(2.0, x);
      default: return $ln(x) / $ln(2.0);
    endcase
  endfunction

  // round |v| to 24 bits in mode rm; returns significand and exponent
  task automatic ref_round(input real v, input rmode_e rm,
                           output int sig, output int e, output bit zero);
    real a, s, fl, rem;
    bit  neg, up;
    neg  = v < 0.0;
    a    = neg ? -v : v;
    zero = (a == 0.0);
    sig  = 0;
    e    = 0;
    if (zero) return;
    e = int'($floor($ln(a) / $ln(2.0)));
    while (a / p2(e) >= 2.0) e++;
    while (a / p2(e) < 1.0) e--;
    s   = a * p2(23 - e);
    fl  = $floor(s);
    rem = s - fl;
    case (rm)
      RM_RNE:  up = (rem > 0.5) || (rem == 0.5 && (longint'(fl) % 2 == 1));
      RM_RPI:  up = (rem > 0.0) && !neg;
      RM_RMI:  up = (rem > 0.0) && neg;
      default: up = 0;
    endcase
    sig = int'(fl) + (up ? 1 : 0);
    if (sig == (1 << 24)) begin
      sig = 1 << 23;
      e   = e + 1;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      int  sig, e;
      bit  z;
      real got, exp_v, ulp;
      o = q.pop_front();
      ref_round(fref(o), o.rm, sig, e, z);
      checks++;
      total[o.f]++;
      if (z) begin
        if (!out_zero) begin failures++; $display("FAIL expected zero"); end
      end else if (out_my != P'(sig) || int'(out_ey) != e || out_sy != (fref(o) < 0.0)) begin
        got   = real'(out_my) * p2(int'(out_ey) - 23);
        exp_v = real'(sig) * p2(e - 23);
        ulp   = p2(e - 23);
        wrong[o.f]++;
        if (got - exp_v > ulp * 1.0001 || exp_v - got > ulp * 1.0001 || out_sy != (fref(o) < 0.0)) begin
          failures++;
          $display("FAIL f=%0d rm=%0d sx=%0d ex=%0d mx=%h: got %h e%0d exp %h e%0d",
                   o.f, o.rm, o.sx, o.ex, o.mx, out_my, out_ey, sig, e);
        end
      end
    end
  end

  task automatic issue(func_e f, rmode_e rm, logic sx, int ex, int mx);
    op_t o;
    in_valid <= 1'b1;
    in_func  <= f;
    in_rmode <= rm;
    in_sx    <= sx;
    in_ex    <= EW'(ex);
    in_mx    <= P'(mx);
    o.f = f; o.rm = rm; o.sx = sx; o.ex = ex; o.mx = mx;
    @(posedge clk);
    q.push_back(o);
  endtask

  initial begin
    in_valid = 1'b0;
    in_func  = F_RECIP;
    in_rmode = RM_RNE;
    in_sx    = 1'b0;
    in_ex    = '0;
    in_mx    = 24'h800000;
    for (int i = 0; i < 4; i++) begin total[i] = 0; wrong[i] = 0; end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 4; f++)
      for (int m = 0; m < 4; m++)
        for (int v = 0; v < 2; v++)
          for (int k = 0; k < (1 << 23); k += STRIDE) begin
            case (f)
              0: issue(F_RECIP, rmode_e'(m), 1'b0, v, (1 << 23) | k);
              1: issue(F_SQRT,  rmode_e'(m), 1'b0, v, (1 << 23) | k);
              // 2^x: x = M * 2^-1 in [0.5,1), M kept to the 23 fraction bits of x
              2: issue(F_EXP2,  rmode_e'(m), v[0], -1, ((1 << 23) | k) & ~1);
              default: issue(F_LOG2, rmode_e'(m), 1'b0, v * 5, (1 << 23) | k);
            endcase
          end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      $display("function %0d: %0d results, %0d not correctly rounded", f, total[f], wrong[f]);
      checks++;
      if (wrong[f] * 1000 > total[f]) begin
        failures++;
        $display("FAIL function %0d misrounds too often", f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
