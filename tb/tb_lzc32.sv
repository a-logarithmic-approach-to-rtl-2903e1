// tb_lzc32: self-checking test of the 32-bit leading-zeros counter.
// Drives every single-one word, each with random lower bits, random words and
// the all-zeros word, and compares count and zero flag with a bit-scan
// reference.
module tb_lzc32;
  logic [31:0] a;
  logic [4:0]  cnt;
  logic        zero;
  int checks = 0, failures = 0;

  lzc32 dut (.a(a), .cnt(cnt), .zero(zero));

  function automatic int ref_lz(logic [31:0] v);
    for (int i = 31; i >= 0; i--) if (v[i]) return 31 - i;
    return 32;
  endfunction

  task automatic check(logic [31:0] v);
    int r;
    a = v;
    #1;
    r = ref_lz(v);
    checks++;
    if (r == 32) begin
      if (!zero) begin failures++; $display("FAIL zero flag for 0"); end
    end else if (zero || int'(cnt) != r) begin
      failures++;
      $display("FAIL a=%h cnt=%0d exp=%0d zero=%b", v, cnt, r, zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0);
    for (int i = 0; i < 32; i++) begin
      check(32'h1 << i);
      check((32'h1 << i) | ($urandom() & ((32'h1 << i) - 1)));
    end
    for (int n = 0; n < 2000; n++) check($urandom() >> ($urandom() % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
