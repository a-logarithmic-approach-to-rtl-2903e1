// tb_lns_unit: end-to-end test of the logarithmic arithmetic unit with all
// parameters at their defaults.
//
// Streams random sign/magnitude integer operations (add, subtract, multiply,
// divide, reciprocal, square root, square, integer power), with random gaps in in_valid and both a zero and a non-zero scale
// factor, and compares every result with the exact result computed in
// floating point. Tolerances follow the converters' and the table's error
// bounds: 0.5 % of the result for multiply, divide, reciprocal, square root
// and square, 0.8 % for effective additions, 1 % of the larger operand for
// effective subtractions and 0.3 % per unit of |y| (+0.3 %) for x^y, plus one
// unit for output rounding. Each result must appear exactly three clocks
// after its operands, in order. Directed operations cause saturation and an
// exact cancellation. Each mechanism is counted and must occur at least once.
module tb_lns_unit;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid = 1'b0, sx = 1'b0, sy = 1'b0;
  unit_op_e           op = UNIT_ADD;
  logic [31:0]        x = 32'd1, y = 32'd1;
  logic signed [31:0] lm = 32'sd0;
  logic               out_valid, out_sign, out_sat;
  logic [31:0]        out_bin, out_lg;

  lns_unit dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int      issue;
    unit_op_e op;
    logic    sx, sy;
    real     xv, yv, lmv;
    bit      expect_sat;
  } txn_t;
  txn_t q[$];

  int cycle = 0;
  int n_add = 0, n_sub = 0, n_mul = 0, n_div = 0, n_swap = 0, n_cancel = 0, n_sat = 0, n_lm = 0;
  int n_range = 0;
  int n_recip = 0, n_sqrt = 0, n_square = 0, n_pow = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic real log2r(real v);
    return v > 0.0 ? $ln(v) / $ln(2.0) : -64.0;
  endfunction

  function automatic bit near_limit(real l);
    return l > 31.9 || l < -31.9;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker, sampling between clock edges
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      txn_t t;
      real  xs, ys, rr, mag, tol, big;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL result without operation");
      end else begin
        t = q.pop_front();
        if (cycle - t.issue != 3) begin
          failures++; $display("FAIL latency %0d", cycle - t.issue);
        end
        xs  = t.sx ? -t.xv : t.xv;
        ys  = t.sy ? -t.yv : t.yv;
        big = t.xv > t.yv ? t.xv : t.yv;
        case (t.op)
          UNIT_ADD:    rr = xs + ys;
          UNIT_SUB:    rr = xs - ys;
          UNIT_MUL:    rr = xs * ys;
          UNIT_DIV:    rr = xs / ys;
          UNIT_RECIP:  rr = 1.0 / xs;
          UNIT_SQRT:   rr = $sqrt(t.xv);
          UNIT_SQUARE: rr = xs * xs;
          default:     rr = $pow(xs, ys);
        endcase
        mag = rr < 0.0 ? -rr : rr;
        if (t.op == UNIT_POW) tol = (0.003 * (t.yv + 1.0)) * mag + 1.0;
        else if (t.op != UNIT_ADD && t.op != UNIT_SUB) tol = 0.005 * mag + 1.0;
        else if ((t.sx ^ t.sy ^ (t.op == UNIT_SUB)) == 1'b0) tol = 0.008 * mag + 1.0;
        else tol = 0.01 * big + 1.0;
        // with a positive scale factor the scaled logarithm can leave the
        // 6.26 range even though the result fits 32 bits: saturation is then
        // the specified outcome
        if (out_sat && !t.expect_sat && (near_limit(log2r(t.xv) + t.lmv) ||
            (t.op < UNIT_RECIP && near_limit(log2r(t.yv) + t.lmv)) ||
            near_limit(log2r(mag) + t.lmv))) begin
          n_range++;
        end else if (t.expect_sat) begin
          if (!out_sat || out_bin < 32'hFFC0_0000) begin failures++; $display("FAIL expected saturation: sat=%b bin=%h", out_sat, out_bin); end
        end else if (real'(out_bin) > mag + tol || real'(out_bin) < mag - tol ||
                     (mag > tol && out_sign != (rr < 0.0))) begin
          failures++;
          $display("FAIL op=%0d x=%s%0.0f y=%s%0.0f got %s%0d exp %f", t.op, t.sx ? "-" : "+", t.xv,
                   t.sy ? "-" : "+", t.yv, out_sign ? "-" : "+", out_bin, rr);
        end
        if (out_sat) n_sat++;
      end
    end
  end

  task automatic issue(unit_op_e o, logic s1, logic [31:0] a, logic s2, logic [31:0] b,
                       logic signed [31:0] l, bit es);
    txn_t t;
    op = o; sx = s1; x = a; sy = s2; y = b; lm = l; in_valid = 1'b1;
    t.issue = cycle; t.op = o; t.sx = s1; t.sy = s2;
    t.xv = real'(a); t.yv = real'(b); t.expect_sat = es;
    t.lmv = real'(l) / 67108864.0;
    q.push_back(t);
    case (o)
      UNIT_MUL:    n_mul++;
      UNIT_DIV:    n_div++;
      UNIT_RECIP:  n_recip++;
      UNIT_SQRT:   n_sqrt++;
      UNIT_SQUARE: n_square++;
      UNIT_POW:    n_pow++;
      default: begin
        if (s1 ^ s2 ^ (o == UNIT_SUB)) n_sub++; else n_add++;
        if (b >= a) n_swap++;
        if ((s1 ^ s2 ^ (o == UNIT_SUB)) && a == b) n_cancel++;
      end
    endcase
    if (l != 0) n_lm++;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a, b;
      unit_op_e    o;
      o = unit_op_e'($urandom() % 8);
      a = 32'($urandom()) >> (16 + $urandom() % 16);
      b = 32'($urandom()) >> (16 + $urandom() % 16);
      if (a == 0) a = 1;
      if (b == 0) b = 1;
      if (n % 10 == 0) b = a;
      if (o == UNIT_POW) begin
        a = 1 + $urandom() % 255;
        b = $urandom() % 5;
      end
      issue(o, 1'($urandom()), a, 1'($urandom()), b,
            (n % 3 == 0) ? 32'(signed'($urandom() % (8 << 26)) - (4 <<< 26)) : 32'sd0, 1'b0);
      if ($urandom() % 4 == 0) begin
        repeat (1 + $urandom() % 2) @(posedge clk);
        #1;
      end
    end
    // saturation of a product
    issue(UNIT_MUL, 1'b0, 32'hFFFF_FFFF, 1'b0, 32'hFFFF_FFFF, 32'sd0, 1'b1);
    // exact cancellation
    issue(UNIT_SUB, 1'b0, 32'd12345, 1'b0, 32'd12345, 32'sd0, 1'b0);
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("add %0d sub %0d mul %0d div %0d swap %0d cancel %0d sat %0d lm %0d",
             n_add, n_sub, n_mul, n_div, n_swap, n_cancel, n_sat, n_lm);
    $display("recip %0d sqrt %0d square %0d pow %0d range-limited %0d", n_recip, n_sqrt, n_square,
             n_pow, n_range);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_mul == 0 || n_div == 0 || n_swap == 0 ||
        n_cancel == 0 || n_sat == 0 || n_lm == 0 || n_recip == 0 || n_sqrt == 0 ||
        n_square == 0 || n_pow == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
