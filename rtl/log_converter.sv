// log_converter: binary magnitude to base-2 logarithm, 32-bit 6.26 result.
//
// A leading-zeros counter finds the most significant one of the input; a
// variable shifter moves it to bit 31, so the input reads 2^e * (1 + x) with
// x in [0,1). The integer unit forms e = 31 - count - IN_FRAC, the 6-bit whole
// part. The fractional unit approximates log2(1 + x) with one of eight
// straight lines a_i*x + b_i, chosen by the three leading bits of x, with
// a_i and b_i from the published table (a in units of 1/128, b in units of
// 1/1024). The product a_i*x is formed by shift-and-add in a three-level
// carry-save tree closing in a 26-bit carry-propagate adder (pwl_sum5).
// Results are modulo 1, which is exact because every line stays in [0,1).
//
// The structure (counter, shifter, integer unit, 26-bit fractional unit of
// three CSA levels and a CPA) and the coefficients follow the published
// converter. This design's own choices: the input is an unsigned fixed-point
// number with IN_FRAC fraction bits (default 0, a 32-bit integer); x keeps the
// 26 bits below the leading one and truncates the rest; a zero input gives
// the most negative code (-32), the smallest magnitude the format holds.
// Purely combinational.
//
// Ports:
//   bin   unsigned binary magnitude, 32 bits
//   lg    two's complement logarithm, 6 whole and 26 fractional bits
//   zero  bin was zero
module log_converter
  import lns_pkg::*;
#(
  parameter int IN_FRAC = 0
) (
  input  logic [BIN_W-1:0] bin,
  output logic [LOG_W-1:0] lg,
  output logic             zero
);

  // Leading zeros counter
  logic [4:0] lz;
  lzc32 u_lzc (.a(bin), .cnt(lz), .zero(zero));

  // Variable shifter: leading one to bit 31
  logic [31:0] norm;
  assign norm = bin << lz;

  logic [LOG_FRAC-1:0] x;
  assign x = norm[30 -: LOG_FRAC];

  // Integer unit
  logic [LOG_INT-1:0] whole;
  assign whole = LOG_INT'(31 - IN_FRAC) - LOG_INT'(lz);

  // Coefficient look-up table
  sa_terms_t           lut_terms [8];
  logic [LOG_FRAC-1:0] lut_cst   [8];
  for (genvar i = 0; i < 8; i++) begin : g_lut
    localparam sa_terms_t           T = csd4(LOG_A128[i]);
    localparam logic [LOG_FRAC-1:0] C =
      LOG_FRAC'(LOG_B1024[i]) << (LOG_FRAC - 10) | LOG_FRAC'(csd4_negs(LOG_A128[i]));
    assign lut_terms[i] = T;
    assign lut_cst[i]   = C;
  end

  logic [2:0] seg;
  assign seg = x[LOG_FRAC-1 -: 3];

  // Fractional unit
  logic [LOG_FRAC-1:0] frac;
  pwl_sum5 #(.W(LOG_FRAC)) u_frac (
    .x    (x),
    .terms(lut_terms[seg]),
    .cst  (lut_cst[seg]),
    .y    (frac)
  );

  assign lg = zero ? LOG_MIN : {whole, frac};

endmodule
