// lns_unit: logarithmic arithmetic unit with binary operands and result.
//
// Two sign/magnitude binary operands are converted to base-2 logarithms,
// combined by the four-function logarithmic ALU (add, subtract, multiply,
// divide) or by the single-operand unit (reciprocal, square root, square,
// power x^y) and the result converted back to sign/magnitude binary.
// Converters use eight-piece linear approximations evaluated by shift-and-add;
// the ALU turns multiply and divide into adding and subtracting logarithms,
// and add and subtract into a table look-up of log2(1 +/- 2^-d). For the power
// the binary y is used directly as the exponent (Y_FRAC fraction bits).
//
// Scale factor: logarithms inside the unit are held as log2(m*x) = Lx + Lm,
// with Lm = log2(m) given on the lm port, so that small magnitudes can be
// kept in a positive logarithm range. The unit adds Lm after the log
// converters and removes it before the antilog converter; the ALU keeps
// products and quotients scaled by subtracting or adding Lm once.
//
// Pipeline (this design's own choice; no latency is published): three
// register stages, one operation accepted per clock, result 3 clocks after
// in_valid.
//   stage 1  log converters, + Lm                   -> registers
//   stage 2  logarithmic ALU or single-operand unit -> registers
//   stage 3  - Lm, antilog converter                -> output registers
// Logarithm additions outside the ALU saturate to the 6.26 range; the most
// negative code stands for zero and is passed through unchanged. Active-low
// synchronous reset clears the valid bits only.
//
// Ports:
//   clk, rst_n          clock, active-low synchronous reset
//   in_valid            operands and op are valid this clock
//   op                  unit_op_e: add, subtract, multiply, divide,
//                       reciprocal, square root, square, power (x^y)
//   sx, x / sy, y       operand signs and 32-bit unsigned magnitudes
//   lm                  log2 of the scale factor, 6.26
//   out_valid           result valid
//   out_sign, out_bin   result sign and 32-bit magnitude (rounded)
//   out_lg              result logarithm, scale removed, 6.26
//   out_sat             a logarithm or the output magnitude saturated
module lns_unit
  import lns_pkg::*;
#(
  parameter int IN_FRAC       = 0,
  parameter int OUT_FRAC      = 0,
  parameter bit IMPROVED      = 1'b1,
  parameter int ROM_INT_BITS  = 5,
  parameter int ROM_FRAC_BITS = 6,
  parameter int Y_FRAC        = IN_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  unit_op_e                op,
  input  logic                    sx,
  input  logic [BIN_W-1:0]        x,
  input  logic                    sy,
  input  logic [BIN_W-1:0]        y,
  input  logic signed [LOG_W-1:0] lm,
  output logic                    out_valid,
  output logic                    out_sign,
  output logic [BIN_W-1:0]        out_bin,
  output logic [LOG_W-1:0]        out_lg,
  output logic                    out_sat
);

  // Saturating 6.26 addition; the zero code passes through.
  function automatic logic [LOG_W:0] add_sat(logic [LOG_W-1:0] l,
                                             logic signed [LOG_W-1:0] k);
    logic signed [LOG_W+1:0] s;
    if (l == LOG_MIN) return {1'b0, LOG_MIN};
    s = (LOG_W+2)'(signed'(l)) + (LOG_W+2)'(k);
    if (s > (LOG_W+2)'(signed'(LOG_MAX))) return {1'b1, LOG_MAX};
    if (s < (LOG_W+2)'(signed'(LOG_MIN))) return {1'b1, LOG_MIN};
    return {1'b0, s[LOG_W-1:0]};
  endfunction

  // ---------------- stage 1: log conversion and scaling
  logic [LOG_W-1:0] lgx, lgy;
  log_converter #(.IN_FRAC(IN_FRAC)) u_logx (.bin(x), .lg(lgx), .zero());
  log_converter #(.IN_FRAC(IN_FRAC)) u_logy (.bin(y), .lg(lgy), .zero());

  logic [LOG_W:0] scx, scy;
  assign scx = add_sat(lgx, lm);
  assign scy = add_sat(lgy, lm);

  logic                    v1, sat1x, sat1y;
  lns_num_t                x1, y1;
  unit_op_e                op1;
  logic signed [LOG_W-1:0] lm1;
  logic [BIN_W-1:0]        ym1;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    x1   <= '{sign: sx, lg: scx[LOG_W-1:0]};
    y1   <= '{sign: sy, lg: scy[LOG_W-1:0]};
    op1  <= op;
    lm1  <= lm;
    ym1  <= y;
    sat1x <= scx[LOG_W];
    sat1y <= scy[LOG_W];
  end

  // ---------------- stage 2: logarithmic ALU or single-operand unit
  lns_num_t za, zu, z;
  logic     alu_sat, un_sat, st2_sat;
  lns_alu #(
    .ROM_INT_BITS (ROM_INT_BITS),
    .ROM_FRAC_BITS(ROM_FRAC_BITS)
  ) u_alu (
    .x  (x1),
    .y  (y1),
    .op (lns_op_e'(op1[1:0])),
    .lm (lm1),
    .z  (za),
    .sat(alu_sat)
  );

  lns_unary #(.Y_FRAC(Y_FRAC)) u_unary (
    .x  (x1),
    .uop(lns_uop_e'(op1[1:0])),
    .lm (lm1),
    .ys (y1.sign),
    .ym (ym1),
    .z  (zu),
    .sat(un_sat)
  );

  assign z       = op1[2] ? zu : za;
  assign st2_sat = op1[2] ? un_sat : alu_sat;

  logic                    v2, sat2;
  lns_num_t                z2;
  logic signed [LOG_W-1:0] lm2;

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    z2   <= z;
    lm2  <= lm1;
    sat2 <= sat1x | (sat1y & !op1[2]) | st2_sat;
  end

  // ---------------- stage 3: unscaling and antilog conversion
  logic [LOG_W:0]   unsc;
  logic [BIN_W-1:0] bin;
  logic             bin_sat;
  assign unsc = add_sat(z2.lg, -lm2);

  antilog_converter #(
    .OUT_FRAC(OUT_FRAC),
    .IMPROVED(IMPROVED)
  ) u_alog (
    .lg (unsc[LOG_W-1:0]),
    .bin(bin),
    .sat(bin_sat)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;
    out_sign <= z2.sign;
    out_bin  <= bin;
    out_lg   <= unsc[LOG_W-1:0];
    out_sat  <= sat2 | unsc[LOG_W] | bin_sat;
  end

endmodule
