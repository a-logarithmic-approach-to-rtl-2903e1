// antilog_converter: base-2 logarithm (6.26) to binary magnitude.
//
// The logarithm reads e + f with e the signed 6-bit whole part and f in [0,1)
// the 26-bit fraction. 2^f is approximated by one of eight straight lines
// c_i*f + d_i chosen by the three leading bits of f, with c_i and d_i from the
// published table (c in units of 1/128). The product c_i*f is formed by
// shift-and-add in a three-level carry-save tree and a carry-propagate adder
// (pwl_sum5), 27 bits wide: one whole bit, since 2^f lies in [1,2), and 26
// fraction bits. The mantissa is then shifted by e and rounded to the output.
//
// Intercepts are held with one extra bit (units of 1/2048). With IMPROVED set
// (the default) the fifth and sixth intercepts are half a unit of 1/1024 lower
// than the published d, which brings the largest positive error of those two
// intervals below the largest negative error of the converter; IMPROVED = 0
// gives the unmodified table for comparison. The line coefficients and this
// correction are as published. This design's own choices: the output is an
// unsigned fixed-point number with OUT_FRAC fraction bits (default 0, a 32-bit
// integer), rounded to nearest (ties up); results too large saturate to all
// ones and results below half an output ulp give 0. Purely combinational.
//
// Ports:
//   lg   two's complement logarithm, 6 whole and 26 fractional bits
//   bin  unsigned binary magnitude, 32 bits
//   sat  the result was too large and bin is all ones
module antilog_converter
  import lns_pkg::*;
#(
  parameter int OUT_FRAC = 0,
  parameter bit IMPROVED = 1'b1
) (
  input  logic [LOG_W-1:0] lg,
  output logic [BIN_W-1:0] bin,
  output logic             sat
);

  localparam int MW = LOG_FRAC + 1;  // mantissa width, 1.26

  logic signed [LOG_INT-1:0] e;
  logic [LOG_FRAC-1:0]       f;
  assign e = lg[LOG_W-1 -: LOG_INT];
  assign f = lg[LOG_FRAC-1:0];

  // Coefficient look-up table
  sa_terms_t     lut_terms [8];
  logic [MW-1:0] lut_cst   [8];
  for (genvar i = 0; i < 8; i++) begin : g_lut
    localparam sa_terms_t     T = csd4(ALOG_C128[i]);
    localparam logic [MW-1:0] C =
      MW'(alog_d2048(i, IMPROVED)) << (LOG_FRAC - 11) | MW'(csd4_negs(ALOG_C128[i]));
    assign lut_terms[i] = T;
    assign lut_cst[i]   = C;
  end

  logic [2:0] seg;
  assign seg = f[LOG_FRAC-1 -: 3];

  logic [MW-1:0] mant;  // 2^f, one whole bit and 26 fraction bits
  pwl_sum5 #(.W(MW)) u_frac (
    .x    ({1'b0, f}),
    .terms(lut_terms[seg]),
    .cst  (lut_cst[seg]),
    .y    (mant)
  );

  // Scale by 2^e. With mant shifted left by e + OUT_FRAC + 33, the output
  // binary point sits at bit 26 + 33 = 59.
  localparam int SW = 96 + OUT_FRAC;
  localparam int BP = LOG_FRAC + 33;

  always_comb begin
    logic [SW-1:0]    wide;
    int               sh;
    logic [SW-BP-1:0] whole;
    logic [SW-BP:0]   rounded;
    sh = int'(e) + OUT_FRAC + 33;
    if (sh < 0) wide = '0;
    else        wide = SW'(mant) << sh;
    whole   = wide[SW-1:BP];
    rounded = {1'b0, whole} + (SW-BP+1)'(wide[BP-1]);
    sat     = (rounded >> BIN_W) != '0;
    bin     = sat ? '1 : rounded[BIN_W-1:0];
  end

endmodule
