// tb_lns_unary: self-checking test of the single-operand logarithmic unit.
// Random operands, scale factors and exponents for each operation; the
// expected logarithm is worked out in real arithmetic from the value rules
// 1/x, sqrt(x), x^2 and x^y (scale removed and restored), saturated to the
// 6.26 range, and must match within one ulp. Signs are checked against the
// sign rules. Each operation and saturation must occur at least once. A second
// instance uses an exponent with 4 fraction bits.
module tb_lns_unary;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  lns_num_t           x, z, z4;
  lns_uop_e           uop;
  logic signed [31:0] lm;
  logic               ys, sat, sat4;
  logic [31:0]        ym;

  lns_unary                dut  (.x(x), .uop(uop), .lm(lm), .ys(ys), .ym(ym), .z(z),  .sat(sat));
  lns_unary #(.Y_FRAC(4))  dut4 (.x(x), .uop(uop), .lm(lm), .ys(ys), .ym(ym), .z(z4), .sat(sat4));

  localparam real ULP = 1.0 / 67108864.0;
  int n_op[4] = '{0, 0, 0, 0};
  int n_sat = 0;

  function automatic real expect_lg(real lxs, real lmr, int op, real yr);
    real l, r;
    l = lxs - lmr;                         // unscaled log2 |x|
    case (op)
      0:       r = -l;                     // log2(1/x)
      1:       r = l / 2.0;                // log2(sqrt x)
      2:       r = 2.0 * l;                // log2(x^2)
      default: r = yr * l;                 // log2(x^y)
    endcase
    r = r + lmr;
    if (r > 32.0 - ULP) r = 32.0 - ULP;
    if (r < -32.0) r = -32.0;
    return r;
  endfunction

  task automatic check_one(lns_num_t zz, logic ss, int yf);
    real yr, e, got;
    logic es;
    yr  = (ys ? -1.0 : 1.0) * real'(ym) / real'(1 << yf);
    e   = expect_lg(real'(x.lg) * ULP, real'(lm) * ULP, int'(uop), yr);
    got = real'(zz.lg) * ULP;
    case (uop)
      UOP_RECIP: es = x.sign;
      UOP_POW:   es = x.sign & ym[yf];
      default:   es = 1'b0;
    endcase
    checks++;
    if (got - e > 1.01 * ULP || e - got > 1.01 * ULP || zz.sign != es) begin
      failures++;
      $display("FAIL uop=%0d yf=%0d x=%h lm=%h y=%s%0d z=%h (%f) exp %f sign %b/%b", uop, yf, x, lm,
               ys ? "-" : "+", ym, zz, got, e, zz.sign, es);
    end
    if (ss) n_sat++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x.sign = 1'($urandom());
      x.lg   = 32'(signed'($urandom() % (60 << 26)) - (30 <<< 26));
      uop    = lns_uop_e'($urandom() % 4);
      lm     = (n % 2 == 0) ? 32'sd0 : 32'(signed'($urandom() % (8 << 26)) - (4 <<< 26));
      ys     = 1'($urandom());
      ym     = 32'($urandom() % 40);
      #1;
      n_op[int'(uop)]++;
      check_one(z, sat, 0);
      check_one(z4, sat4, 4);
    end
    $display("recip %0d sqrt %0d square %0d pow %0d sat %0d", n_op[0], n_op[1], n_op[2], n_op[3], n_sat);
    checks++;
    if (n_op[0] == 0 || n_op[1] == 0 || n_op[2] == 0 || n_op[3] == 0 || n_sat == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
