// tb_efg_top: end-to-end test of the elementary function generator at its
// default (single-precision) parameters.
//
// Random and directed operands for all four functions in all four rounding
// modes stream in, mostly back to back. A reference model computes the
// function in double precision and rounds it to 24 bits in the requested
// mode. Each result must arrive exactly LATENCY cycles after its operand,
// be within one unit in the last place of the reference, and at least 99%
// of the results must equal it exactly (the table holds unadjusted
// Chebyshev coefficients, so a rare result near a rounding boundary may
// round the other way). Domain errors must be flagged. Every mechanism of
// the design is counted and must occur at least once: each function path
// (sqrt with odd and even exponent, 2^x for both signs, log2 through the
// ratio path, with positive and negative exponent, and its exact zero),
// each rounding mode, a rounding carry that renormalizes the significand,
// exact results, each kind of domain error and back-to-back issue.
module tb_efg_top;
  import efg_pkg::*;

  localparam int LATENCY = 2;
  localparam int NRAND   = 6000;

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

  int checks = 0, failures = 0, misrounded = 0, compared = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_recip, n_sqrt_even, n_sqrt_odd, n_exp2_pos, n_exp2_neg;
  int n_log2_ratio, n_log2_pos, n_log2_neg, n_log2_zero;
  int n_mode [4];
  int n_carry, n_exact, n_err_sqrt, n_err_log2, n_err_exp2, n_b2b;

  typedef struct {
    func_e  f;
    rmode_e rm;
    logic   sx;
    int     ex;
    int     mx;
    longint t_issue;
  } op_t;
  op_t q [$];

  // ---------------- reference model ----------------
  function automatic real p2(int e);
    return $pow(2.0, real'(e));
  endfunction

  function automatic real opval(op_t o);
    return (o.sx ? -1.0 : 1.0) * real'(o.mx) * p2(o.ex - 23);
  endfunction

  function automatic bit in_domain(op_t o);
    if ((o.f == F_SQRT || o.f == F_LOG2) && o.sx) return 0;
    if (o.f == F_EXP2 && o.ex > 7) return 0;
    return 1;
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

  // ---------------- checker ----------------
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      int  sig, e;
      bit  z;
      real got, exp_v, ulp;
      o = q.pop_front();
      checks++;
      if (cycle - o.t_issue != LATENCY) begin
        failures++;
        $display("FAIL latency %0d", cycle - o.t_issue);
      end
      if (!in_domain(o)) begin
        checks++;
        if (!out_err) begin
          failures++;
          $display("FAIL no error flag: f=%0d sx=%0d ex=%0d", o.f, o.sx, o.ex);
        end
        if (o.f == F_SQRT) n_err_sqrt++;
        if (o.f == F_LOG2) n_err_log2++;
        if (o.f == F_EXP2) n_err_exp2++;
      end else begin
        ref_round(fref(o), o.rm, sig, e, z);
        checks++;
        compared++;
        if (out_err) begin
          failures++;
          $display("FAIL spurious error flag f=%0d", o.f);
        end
        if (z) begin
          if (!out_zero) begin
            failures++;
            $display("FAIL expected zero");
          end
        end else if (out_zero || out_sy != (fref(o) < 0.0)) begin
          failures++;
          $display("FAIL zero/sign f=%0d ex=%0d mx=%h", o.f, o.ex, o.mx);
        end else if (out_my != P'(sig) || int'(out_ey) != e) begin
          got   = real'(out_my) * (p2(int'(out_ey) - 23));
          exp_v = real'(sig) * p2(e - 23);
          ulp   = p2(e - 23);
          misrounded++;
          if ((got - exp_v > ulp * 1.0001) || (exp_v - got > ulp * 1.0001) || !out_my[P-1]) begin
            failures++;
            $display("FAIL f=%0d rm=%0d sx=%0d ex=%0d mx=%h: got %h e%0d exp %h e%0d",
                     o.f, o.rm, o.sx, o.ex, o.mx, out_my, out_ey, sig, e);
          end
        end
        if (!out_inexact && !z) n_exact++;
        if (out_inexact && out_my == 24'h800000 && !z) n_carry++;
        n_mode[o.rm]++;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic issue(func_e f, rmode_e rm, logic sx, int ex, int mx);
    op_t o;
    in_valid <= 1'b1;
    in_func  <= f;
    in_rmode <= rm;
    in_sx    <= sx;
    in_ex    <= EW'(ex);
    in_mx    <= P'(mx);
    o.f = f; o.rm = rm; o.sx = sx; o.ex = ex; o.mx = mx; o.t_issue = cycle + 1;
    @(posedge clk);
    q.push_back(o);
    case (f)
      F_RECIP: n_recip++;
      F_SQRT:  if (!sx) begin if (ex % 2 == 0) n_sqrt_even++; else n_sqrt_odd++; end
      F_EXP2:  if (ex <= 7) begin if (sx) n_exp2_neg++; else n_exp2_pos++; end
      default: if (!sx) begin
                 if (ex == 0 && mx == (1 << 23)) n_log2_zero++;
                 else if (ex == 0) n_log2_ratio++;
                 else if (ex > 0) n_log2_pos++;
                 else n_log2_neg++;
               end
    endcase
  endtask

  task automatic idle();
    in_valid <= 1'b0;
    @(posedge clk);
  endtask

  function automatic int rand_mx();
    return int'((1 << 23) | ($urandom & 32'h7fffff));
  endfunction

  task automatic random_op();
    func_e  f;
    rmode_e rm;
    int     ex, mx;
    logic   sx;
    f  = func_e'($urandom_range(0, 3));
    rm = rmode_e'($urandom_range(0, 3));
    mx = rand_mx();
    sx = 1'b0;
    case (f)
      F_RECIP: begin
        ex = $urandom_range(0, 200) - 100;
        sx = $urandom_range(0, 1) == 1;
      end
      F_SQRT: ex = $urandom_range(0, 200) - 100;
      F_EXP2: begin
        ex = $urandom_range(0, 30) - 23;
        sx = $urandom_range(0, 1) == 1;
        // operands whose fraction fits 23 bits, which the reduction keeps
        if (ex < 0) mx = mx & ~((1 << (-ex)) - 1);
      end
      default: begin
        case ($urandom_range(0, 3))
          0:       ex = 0;
          1:       ex = $urandom_range(1, 60);
          2:       ex = -2 - int'($urandom_range(0, 60));
          default: ex = -1;
        endcase
        // log2 just below 1 loses bits by cancellation: keep x <= 0.95
        if (ex == -1 && mx > 24'hF33333) mx = 24'hF33333;
      end
    endcase
    issue(f, rm, sx, ex, mx);
  endtask

  int prev_issue;

  initial begin
    in_valid = 1'b0;
    in_func  = F_RECIP;
    in_rmode = RM_RNE;
    in_sx    = 1'b0;
    in_ex    = '0;
    in_mx    = 24'h800000;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // directed: exact results, rounding carries, errors
    for (int m = 0; m < 4; m++) begin
      issue(F_RECIP, rmode_e'(m), 1'b0, 3, 1 << 23);              // 1/8
      issue(F_SQRT,  rmode_e'(m), 1'b0, 2, 1 << 23);              // sqrt(4)
      issue(F_SQRT,  rmode_e'(m), 1'b0, 1, 24'h900000);           // sqrt(2.25)
      issue(F_EXP2,  rmode_e'(m), 1'b0, 1, 24'hC00000);           // 2^3
      issue(F_EXP2,  rmode_e'(m), 1'b1, 2, 1 << 23);              // 2^-4
      issue(F_LOG2,  rmode_e'(m), 1'b0, 0, 1 << 23);              // log2(1)
      issue(F_LOG2,  rmode_e'(m), 1'b0, 5, 1 << 23);              // log2(32)
      issue(F_LOG2,  rmode_e'(m), 1'b0, -3, 1 << 23);             // log2(1/8)
      issue(F_RECIP, rmode_e'(m), 1'b0, 0, (1 << 23) + 1);        // 1 - 2^-23 + ...
      issue(F_RECIP, rmode_e'(m), 1'b1, 0, (1 << 23) + 1);
      issue(F_LOG2,  rmode_e'(m), 1'b0, 0, (1 << 23) + 1);        // tiny log2
      issue(F_LOG2,  rmode_e'(m), 1'b0, 0, 24'hFFFFFF);
    end
    issue(F_SQRT, RM_RNE, 1'b1, 3, rand_mx());                     // errors
    issue(F_LOG2, RM_RNE, 1'b1, 0, rand_mx());
    issue(F_EXP2, RM_RNE, 1'b0, 8, rand_mx());
    idle();

    prev_issue = 0;
    for (int i = 0; i < NRAND; i++) begin
      if ($urandom_range(0, 9) == 0) idle();
      else begin
        random_op();
        n_b2b++;
      end
    end
    idle();
    repeat (LATENCY + 2) @(posedge clk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    checks++;
    if (misrounded * 100 > compared) begin
      failures++;
      $display("FAIL %0d of %0d results not correctly rounded", misrounded, compared);
    end
    $display("results compared %0d, correctly rounded %0d, one ulp off %0d",
             compared, compared - misrounded, misrounded);
    $display("recip %0d sqrt even %0d odd %0d exp2 pos %0d neg %0d log2 ratio %0d pos %0d neg %0d zero %0d",
             n_recip, n_sqrt_even, n_sqrt_odd, n_exp2_pos, n_exp2_neg,
             n_log2_ratio, n_log2_pos, n_log2_neg, n_log2_zero);
    $display("modes %0d %0d %0d %0d carry %0d exact %0d errors %0d %0d %0d back-to-back %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_carry, n_exact,
             n_err_sqrt, n_err_log2, n_err_exp2, n_b2b);
    begin
      int m [19];
      m = '{n_recip, n_sqrt_even, n_sqrt_odd, n_exp2_pos, n_exp2_neg, n_log2_ratio,
            n_log2_pos, n_log2_neg, n_log2_zero, n_mode[0], n_mode[1], n_mode[2],
            n_mode[3], n_carry, n_exact, n_err_sqrt, n_err_log2, n_err_exp2, n_b2b};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never exercised", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
