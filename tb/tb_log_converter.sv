// tb_log_converter: self-checking test of the binary-to-logarithm converter.
//
// 1. Line check: for inputs with the leading one at bit 31 and the 26 bits
//    below it swept over [0,1), the fraction must equal a_i*x + b_i from the
//    coefficient table (128*a and 1024*b per interval) within 4 ulps either way of
//    truncation in the shift-and-add terms, and the whole part must be 31.
// 2. Error envelope: the error (approx - log2 v) / (1 + log2(1+x)) must stay
//    inside -0.190 % .. +0.103 % (plus a 0.002 % margin), with its extremes
//    near -0.190 % (in the first interval) and +0.103 % (at x = 3/8).
// 3. Random 32-bit integers of every magnitude: whole part = floor(log2 v).
// 4. Zero gives the most negative code and the zero flag; a second instance
//    with 16 input fraction bits shifts the whole part by -16.
module tb_log_converter;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] bin;
  logic [31:0] lg, lg16;
  logic        zero, zero16;

  log_converter              dut   (.bin(bin), .lg(lg),   .zero(zero));
  log_converter #(.IN_FRAC(16)) dut16 (.bin(bin), .lg(lg16), .zero(zero16));

  localparam int A128 [8] = '{175, 158, 142, 127, 119, 110, 102, 95};
  localparam int B1024[8] = '{0, 15, 46, 91, 123, 167, 215, 264};

  real emin = 1.0, emax = -1.0, xmin = 0.0, xmax = 0.0;

  function automatic real lg_real(logic [31:0] l);
    return real'(signed'(l)) / 67108864.0;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1 and 2: dense sweep of the fraction
    for (int k = 0; k < 32768; k++) begin
      longint xi;
      real    xr, ideal, tru, err;
      int     seg;
      bin = 32'h8000_0000 | (32'(k) << 16) | 32'($urandom() & 32'hFFFF);
      #1;
      xi    = longint'(bin[30:5]);
      seg   = int'(bin[30:28]);
      ideal = real'(A128[seg]) * real'(xi) / 128.0 + real'(B1024[seg]) * 65536.0;
      checks++;
      if (lg[31:26] != 6'd31 ||
          real'(lg[25:0]) > ideal + 4.0 || real'(lg[25:0]) < ideal - 4.0) begin
        failures++;
        $display("FAIL line: bin=%h lg=%h ideal=%f", bin, lg, ideal / 67108864.0);
      end
      xr  = real'(bin) / 2147483648.0 - 1.0;
      tru = $ln(1.0 + xr) / $ln(2.0);
      err = (lg_real(lg) - 31.0 - tru) / (1.0 + tru) * 100.0;
      if (err < emin) begin emin = err; xmin = xr; end
      if (err > emax) begin emax = err; xmax = xr; end
      checks++;
      if (err < -0.192 || err > 0.105) begin
        failures++;
        $display("FAIL envelope: x=%f err=%f %%", xr, err);
      end
    end
    $display("log converter error range %f %% (x=%f) .. %f %% (x=%f)", emin, xmin, emax, xmax);
    checks++;
    if (emin > -0.185 || xmin >= 0.125) begin
      failures++; $display("FAIL worst negative error not as expected");
    end
    checks++;
    if (emax < 0.099 || xmax < 0.37 || xmax > 0.38) begin
      failures++; $display("FAIL worst positive error not as expected");
    end

    // 3: whole part for all magnitudes
    for (int n = 0; n < 3000; n++) begin
      int p;
      p   = $urandom() % 32;
      bin = (32'h1 << p) | ($urandom() & ((32'h1 << p) - 1));
      #1;
      checks++;
      if (signed'(lg[31:26]) != p || zero) begin
        failures++; $display("FAIL whole: bin=%h lg=%h", bin, lg);
      end
      checks++;
      if (signed'(lg16[31:26]) != p - 16 || lg16[25:0] != lg[25:0]) begin
        failures++; $display("FAIL IN_FRAC=16: bin=%h lg16=%h", bin, lg16);
      end
    end
    // exact powers of two give a zero fraction
    for (int p = 0; p < 32; p++) begin
      bin = 32'h1 << p;
      #1;
      checks++;
      if (lg != {6'(p), 26'd0}) begin failures++; $display("FAIL 2^%0d: lg=%h", p, lg); end
    end

    // 4: zero
    bin = '0;
    #1;
    checks++;
    if (!zero || lg != 32'h8000_0000) begin failures++; $display("FAIL zero"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
