// phi_rom: look-up of the logarithmic addition and subtraction functions
//   phi+(d) = log2(1 + 2^-d),   phi-(d) = log2(1 - 2^-d),   d >= 0,
// which turn a sum or difference of two logarithmic numbers into
// L = Lmax + phi(Lmax - Lmin).
//
// The ROM is addressed by d truncated to ROM_INT_BITS whole and ROM_FRAC_BITS
// fractional bits (2^(ROM_INT_BITS+ROM_FRAC_BITS) words per function); each
// word holds the function at the middle of its address interval, rounded to a
// 6.26 logarithm. For d at or beyond 2^ROM_INT_BITS = 32 both functions are
// below half an ulp of the 26-bit fraction and the output is 0. An exact d = 0
// with phi- selected (x - x) has no finite logarithm and gives the most
// negative code, read elsewhere as the smallest magnitude.
//
// A ROM for phi+ and phi- selected by a 'minus' control is as published; its
// addressing, size and contents rule are this design's own, since no size is
// given. The contents are computed at elaboration from the formulas above.
// Purely combinational (an asynchronous-read ROM).
//
// Ports:
//   d      unsigned 7.26 difference of the two logarithms (33 bits)
//   minus  1 selects phi-, 0 selects phi+
//   phi    two's complement 6.26 result
module phi_rom
  import lns_pkg::*;
#(
  parameter int ROM_INT_BITS  = 5,
  parameter int ROM_FRAC_BITS = 6
) (
  input  logic [LOG_W:0]          d,
  input  logic                    minus,
  output logic signed [LOG_W-1:0] phi
);

  localparam int AW    = ROM_INT_BITS + ROM_FRAC_BITS;
  localparam int DEPTH = 1 << AW;

  function automatic logic [LOG_W-1:0] phi_word(int idx, bit sub);
    real dv, v;
    dv = (real'(idx) + 0.5) / real'(1 << ROM_FRAC_BITS);
    if (sub) v = $ln(1.0 - $pow(2.0, -dv)) / $ln(2.0);
    else     v = $ln(1.0 + $pow(2.0, -dv)) / $ln(2.0);
    return LOG_W'(longint'(v * real'(64'd1 << LOG_FRAC)));
  endfunction

  logic [LOG_W-1:0] rom_p [DEPTH];
  logic [LOG_W-1:0] rom_m [DEPTH];
  for (genvar g = 0; g < DEPTH; g++) begin : g_rom
    localparam logic [LOG_W-1:0] VP = phi_word(g, 1'b0);
    localparam logic [LOG_W-1:0] VM = phi_word(g, 1'b1);
    assign rom_p[g] = VP;
    assign rom_m[g] = VM;
  end

  logic [AW-1:0] addr;
  logic          beyond;
  assign addr   = d[LOG_FRAC+ROM_INT_BITS-1 -: AW];
  assign beyond = (d >> (LOG_FRAC + ROM_INT_BITS)) != '0;

  always_comb begin
    if (minus && d == '0) phi = LOG_MIN;
    else if (beyond)      phi = '0;
    else if (minus)       phi = rom_m[addr];
    else                  phi = rom_p[addr];
  end

endmodule
