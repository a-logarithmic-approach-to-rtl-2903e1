// tb_pwl_sum5: self-checking test of the shift-and-add piece evaluator.
// Random operands, random term sets (enable, negate, shift 0..8) and random
// constants at two widths; the reference sums the terms with plain integer
// arithmetic modulo 2^W, a negated term counting as -(shifted x) - 1.
module tb_pwl_sum5;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  logic [25:0] x26, c26, y26;
  logic [26:0] x27, c27, y27;
  sa_terms_t   t26, t27;

  pwl_sum5 #(.W(26)) dut26 (.x(x26), .terms(t26), .cst(c26), .y(y26));
  pwl_sum5 #(.W(27)) dut27 (.x(x27), .terms(t27), .cst(c27), .y(y27));

  function automatic longint ref_sum(longint x, sa_terms_t t, longint c, int w);
    longint s, sh, m;
    m = (longint'(1) << w) - 1;
    s = c;
    for (int j = 0; j < 4; j++) begin
      if (!t[j].en) continue;
      if (t[j].k >= 7) sh = (x << (t[j].k - 7)) & m;
      else             sh = x >> (7 - t[j].k);
      s = t[j].neg ? s - sh - 1 : s + sh;
    end
    return s & m;
  endfunction

  function automatic sa_terms_t rand_terms();
    sa_terms_t t;
    for (int j = 0; j < 4; j++) begin
      t[j].en  = 1'($urandom());
      t[j].neg = 1'($urandom());
      t[j].k   = 4'($urandom() % 9);
    end
    return t;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      x26 = 26'($urandom()); c26 = 26'($urandom()); t26 = rand_terms();
      x27 = 27'($urandom()); c27 = 27'($urandom()); t27 = rand_terms();
      if (n == 0) begin t26 = '0; t27 = '0; end
      #1;
      checks += 2;
      if (longint'(y26) != ref_sum(longint'(x26), t26, longint'(c26), 26)) begin
        failures++;
        $display("FAIL W=26 x=%h c=%h t=%h y=%h exp=%h", x26, c26, t26, y26,
                 ref_sum(longint'(x26), t26, longint'(c26), 26));
      end
      if (longint'(y27) != ref_sum(longint'(x27), t27, longint'(c27), 27)) begin
        failures++;
        $display("FAIL W=27 x=%h y=%h", x27, y27);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
