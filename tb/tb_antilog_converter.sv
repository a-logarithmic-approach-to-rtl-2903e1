// tb_antilog_converter: self-checking test of the logarithm-to-binary
// converter.
//
// 1. Line check: with whole part 31 the output is the 1.26 mantissa times 32,
//    which must equal c_i*f + d_i (128*c, 2048*d per interval, the fifth and
//    sixth d lowered by one unit of 1/2048) within 4 ulps.
// 2. Error envelope of the default (corrected) converter over a dense sweep
//    of f: inside -0.073 % .. +0.0705 %, the worst
//    negative error at f = 3/8 (the listed coefficients give -0.0725 % there
//    against a rounded -0.070 % quoted for them). The uncorrected table (IMPROVED = 0) must show
//    its larger positive error of about +0.082 % in the sixth interval.
// 3. Scaling and rounding: random whole parts -3..30, output within half an
//    ulp plus the relative error bound of round(2^L); the zero code gives 0.
// 4. Saturation: with one output fraction bit, 2^31 no longer fits.
module tb_antilog_converter;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] lg;
  logic [31:0] bin, bin0, bin1;
  logic        sat, sat0, sat1;

  antilog_converter                  dut  (.lg(lg), .bin(bin),  .sat(sat));
  antilog_converter #(.IMPROVED(0))  dut0 (.lg(lg), .bin(bin0), .sat(sat0));
  antilog_converter #(.OUT_FRAC(1))  dut1 (.lg(lg), .bin(bin1), .sat(sat1));

  localparam int C128 [8] = '{92, 101, 111, 121, 131, 143, 155, 169};
  localparam int D1024[8] = '{1024, 1015, 995, 964, 924, 864, 792, 695};

  real emin = 1.0, emax = -1.0, xmin = 0.0, xmax = 0.0, emax0 = -1.0, xmax0 = 0.0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32768; k++) begin
      int  seg;
      real fr, ideal, tru, err, err0, d2048;
      lg = {6'd31, 26'(k) << 11 | 26'($urandom() & 32'h7FF)};
      #1;
      seg   = int'(lg[25:23]);
      fr    = real'(lg[25:0]) / 67108864.0;
      d2048 = 2.0 * real'(D1024[seg]) - ((seg == 4 || seg == 5) ? 1.0 : 0.0);
      ideal = real'(C128[seg]) * real'(lg[25:0]) / 128.0 + d2048 * 32768.0;
      checks++;
      if (bin[4:0] != 5'd0 || sat ||
          real'(bin >> 5) > ideal + 4.0 || real'(bin >> 5) < ideal - 4.0) begin
        failures++;
        $display("FAIL line: lg=%h bin=%h ideal=%f", lg, bin, ideal / 67108864.0);
      end
      tru  = $pow(2.0, fr) * 2147483648.0;
      err  = (real'(bin) - tru) / tru * 100.0;
      err0 = (real'(bin0) - tru) / tru * 100.0;
      if (err < emin) begin emin = err; xmin = fr; end
      if (err > emax) begin emax = err; xmax = fr; end
      if (err0 > emax0) begin emax0 = err0; xmax0 = fr; end
      checks++;
      if (err < -0.0730 || err > 0.0705) begin
        failures++;
        $display("FAIL envelope: f=%f err=%f %%", fr, err);
      end
    end
    $display("corrected   error range %f %% (f=%f) .. %f %% (f=%f)", emin, xmin, emax, xmax);
    $display("uncorrected max error %f %% (f=%f)", emax0, xmax0);
    checks++;
    if (emin > -0.068 || xmin < 0.374 || xmin > 0.376) begin
      failures++; $display("FAIL worst negative error not at 3/8");
    end
    checks++;
    if (emax > 0.0705 || emax0 < 0.080 || xmax0 < 0.625 || xmax0 >= 0.75) begin
      failures++; $display("FAIL half-ulp correction not effective");
    end

    // 3: scaling and rounding
    for (int n = 0; n < 4000; n++) begin
      int  e;
      real tru;
      e  = int'($urandom() % 34) - 3;
      lg = {6'(e), 26'($urandom())};
      #1;
      tru = $pow(2.0, real'(signed'(lg)) / 67108864.0);
      checks++;
      if (real'(bin) > tru * 1.00075 + 0.5 || real'(bin) < tru * 0.99925 - 0.5 || sat) begin
        failures++;
        $display("FAIL scale: lg=%h bin=%0d ref=%f", lg, bin, tru);
      end
    end
    lg = 32'h8000_0000;
    #1;
    checks++;
    if (bin != 0 || sat) begin failures++; $display("FAIL zero code"); end
    lg = {6'd0, 26'd0};
    #1;
    checks++;
    if (bin != 1) begin failures++; $display("FAIL 2^0 = %0d", bin); end

    // 4: saturation
    lg = {6'd31, 26'h100_0000};
    #1;
    checks++;
    if (!sat1 || bin1 != '1 || sat) begin failures++; $display("FAIL saturation"); end
    lg = {6'd30, 26'h0};
    #1;
    checks++;
    if (sat1 || bin1 != 32'h8000_0000) begin failures++; $display("FAIL OUT_FRAC=1: %h", bin1); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
