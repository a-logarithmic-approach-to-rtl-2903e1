// tb_lns_alu: self-checking test of the four-function logarithmic ALU.
//
// Random signed operands with logarithms in [-20, 20), random operations and
// scale factors. Multiply and divide must give Lx + Ly - Lm and Lx - Ly + Lm
// exactly. Add and subtract are compared with log2 |X +/- Y| computed in
// floating point, within the table's interpolation bound (half an address
// interval times the largest slope of phi in it). Signs are checked for all
// four operations. Directed cases cover exact cancellation, saturation at
// both ends and the swap of operands when Ly is the larger. Each mechanism
// (effective addition, effective subtraction, multiply, divide, swap,
// cancellation, saturation, non-zero scale factor) is counted and must occur.
module tb_lns_alu;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  lns_num_t                x, y, z;
  lns_op_e                 op;
  logic signed [31:0]      lm;
  logic                    sat;

  lns_alu dut (.x(x), .y(y), .op(op), .lm(lm), .z(z), .sat(sat));

  localparam real ULP = 1.0 / 67108864.0;
  localparam int  RF  = 6;

  int n_add = 0, n_sub = 0, n_mul = 0, n_div = 0, n_swap = 0, n_cancel = 0, n_sat = 0, n_lm = 0;

  function automatic real r(logic signed [31:0] l);
    return real'(l) * ULP;
  endfunction

  task automatic run_check();
    logic               syeff, minus, exp_sign;
    logic signed [33:0] e;
    real                lx, ly, d, dlo, s, exp_l, tol, slope;
    #1;
    checks++;
    if (lm != 0) n_lm++;
    if (sat) n_sat++;
    if (op == OP_MUL || op == OP_DIV) begin
      if (op == OP_MUL) begin e = 34'(x.lg) + 34'(y.lg) - 34'(lm); n_mul++; end
      else              begin e = 34'(x.lg) - 34'(y.lg) + 34'(lm); n_div++; end
      if (e > 34'sh7FFF_FFFF) e = 34'sh7FFF_FFFF;
      if (e < -34'sh8000_0000) e = -34'sh8000_0000;
      if (34'(z.lg) != e || z.sign != (x.sign ^ y.sign)) begin
        failures++;
        $display("FAIL op=%0d x=%h y=%h lm=%h z=%h exp=%h", op, x, y, lm, z, e);
      end
      return;
    end
    syeff = y.sign ^ (op == OP_SUB);
    minus = x.sign ^ syeff;
    if (minus) n_sub++; else n_add++;
    if (!(x.lg > y.lg)) n_swap++;
    lx = r(x.lg); ly = r(y.lg);
    if (minus && x.lg == y.lg) begin
      n_cancel++;
      if (z.lg != 32'sh8000_0000) begin failures++; $display("FAIL cancel z=%h", z); end
      return;
    end
    s = (x.sign ? -$pow(2.0, lx) : $pow(2.0, lx)) + (syeff ? -$pow(2.0, ly) : $pow(2.0, ly));
    exp_sign = s < 0.0;
    exp_l    = $ln(s < 0.0 ? -s : s) / $ln(2.0);
    d        = lx > ly ? lx - ly : ly - lx;
    dlo      = real'(int'($floor(d * real'(1 << RF)))) / real'(1 << RF);
    if (minus && dlo == 0.0) begin
      // steepest part of phi-: only the sign and an upper bound are checked
      if (r(z.lg) > (lx > ly ? lx : ly) || z.sign != exp_sign) begin
        failures++; $display("FAIL near-cancel x=%h y=%h z=%h", x, y, z);
      end
      return;
    end
    slope = minus ? $pow(2.0, -dlo) / (1.0 - $pow(2.0, -dlo)) : 0.5;
    tol   = slope * 0.5 / real'(1 << RF) + 4.0 * ULP;
    if (r(z.lg) - exp_l > tol || exp_l - r(z.lg) > tol || z.sign != exp_sign) begin
      failures++;
      $display("FAIL op=%0d x=%h y=%h z=%h (%f) exp=%f sign %b", op, x, y, z, r(z.lg), exp_l, exp_sign);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x.sign = 1'($urandom()); y.sign = 1'($urandom());
      x.lg   = 32'(signed'($urandom() % (40 << 26)) - (20 <<< 26));
      y.lg   = (n % 4 == 0) ? x.lg + 32'(signed'($urandom() % (3 << 26)) - (1 <<< 26))
                            : 32'(signed'($urandom() % (40 << 26)) - (20 <<< 26));
      op     = lns_op_e'($urandom() % 4);
      lm     = (n % 2 == 0) ? 32'sd0 : 32'(signed'($urandom() % (8 << 26)) - (4 <<< 26));
      run_check();
    end
    // exact cancellation: x - x and x + (-x)
    x = '{sign: 1'b0, lg: 32'sh0123_4567}; y = x; op = OP_SUB; lm = 0;
    run_check();
    y.sign = 1'b1; op = OP_ADD;
    run_check();
    // saturation, high and low
    x = '{sign: 1'b0, lg: 32'sh7000_0000}; y = x; op = OP_MUL; lm = 0;
    run_check();
    checks++; if (!sat) begin failures++; $display("FAIL no high saturation"); end
    x.lg = 32'sh9000_0000; y.lg = 32'sh7000_0000; op = OP_DIV;
    run_check();
    checks++; if (!sat) begin failures++; $display("FAIL no low saturation"); end
    // addition near the top of the range saturates
    x.lg = 32'sh7FFF_FFF0; y.lg = 32'sh7FFF_FFF0; op = OP_ADD; x.sign = 0; y.sign = 0;
    #1;
    checks++; if (!sat || z.lg != 32'sh7FFF_FFFF) begin failures++; $display("FAIL add saturation"); end

    $display("add %0d sub %0d mul %0d div %0d swap %0d cancel %0d sat %0d lm %0d",
             n_add, n_sub, n_mul, n_div, n_swap, n_cancel, n_sat, n_lm);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_mul == 0 || n_div == 0 || n_swap == 0 ||
        n_cancel == 0 || n_sat == 0 || n_lm == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
