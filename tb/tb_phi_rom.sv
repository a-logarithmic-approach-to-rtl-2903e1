// tb_phi_rom: self-checking test of the phi+/phi- look-up.
//
// Random differences d over [0, 40) and a sweep of the table range: each word
// must equal log2(1 +/- 2^-dm) at the middle dm of its address interval,
// rounded to 26 fraction bits (1 ulp allowed), and be within half an interval
// times the largest slope of the true function at d. Beyond 32 both outputs
// are 0; d = 0 with phi- gives the most negative code.
module tb_phi_rom;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  localparam int RF = 6;  // address fraction bits (default)

  logic [32:0]        d;
  logic               minus;
  logic signed [31:0] phi;

  phi_rom dut (.d(d), .minus(minus), .phi(phi));

  function automatic real fphi(real dv, bit m);
    return m ? $ln(1.0 - $pow(2.0, -dv)) / $ln(2.0) : $ln(1.0 + $pow(2.0, -dv)) / $ln(2.0);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      real dv, dm, dlo, got, slope, tol;
      d     = (n < 4096) ? 33'(n) << (26 - RF) | 33'($urandom() & 32'hFFFFF)
                         : 33'($urandom()) % (33'd40 << 26);
      minus = 1'($urandom());
      if (d == 0) d = 1;
      #1;
      dv  = real'(d) / 67108864.0;
      got = real'(phi) / 67108864.0;
      checks++;
      if (dv >= 32.0) begin
        if (phi != 0) begin failures++; $display("FAIL beyond: d=%f phi=%f", dv, got); end
        continue;
      end
      dlo = real'(d >> (26 - RF)) / real'(1 << RF);
      dm  = dlo + 0.5 / real'(1 << RF);
      if (got - fphi(dm, minus) > 1.5 / 67108864.0 || fphi(dm, minus) - got > 1.5 / 67108864.0) begin
        failures++;
        $display("FAIL word: d=%f minus=%b phi=%f exp=%f", dv, minus, got, fphi(dm, minus));
      end
      checks++;
      if (dlo > 0.0) begin
        slope = minus ? $pow(2.0, -dlo) / (1.0 - $pow(2.0, -dlo)) : 0.5;
        tol   = slope * 0.5 / real'(1 << RF) + 2.0 / 67108864.0;
        if (got - fphi(dv, minus) > tol || fphi(dv, minus) - got > tol) begin
          failures++;
          $display("FAIL accuracy: d=%f minus=%b phi=%f true=%f", dv, minus, got, fphi(dv, minus));
        end
      end
    end
    d = 0; minus = 1'b1;
    #1;
    checks++;
    if (phi != 32'sh8000_0000) begin failures++; $display("FAIL d=0 phi-"); end
    minus = 1'b0;
    #1;
    checks++;
    if (phi > 32'sh0400_0000 || phi < 32'sh03F8_0000) begin  // about 1
      failures++; $display("FAIL d=0 phi+ %h", phi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
