// lns_unary: single-operand logarithmic operations: reciprocal, square root,
// square and power.
//
// In the logarithmic domain these need no table: 1/x is -Lx, sqrt(x) is Lx
// shifted right by one, x^2 is Lx shifted left by one, and x^y is y * Lx with
// y an ordinary binary number. These four rules are as published. This design's
// own choices:
//   - Scale factor. Operands arrive scaled, L' = Lx + Lm. The unit removes Lm,
//     applies the rule and adds Lm back, so results carry the same scale as
//     the ALU's (with Lm = 0 this is exactly the plain rule).
//   - The square root shifts arithmetically (rounds toward minus infinity),
//     and its result sign is 0; the sign of a negative operand is dropped.
//   - y of the power is sign/magnitude, 32-bit magnitude with Y_FRAC fraction
//     bits (default 0: an integer exponent); the product is truncated back to
//     26 fraction bits. A negative x gives a negative result when the integer
//     part of y is odd. The square's result sign is 0, the reciprocal keeps
//     the operand's sign.
//   - Results outside [-32, 32) saturate and raise sat.
// Purely combinational.
//
// Ports:
//   x       operand (sign, scaled 6.26 logarithm)
//   uop     lns_uop_e: reciprocal, square root, square, power
//   lm      logarithm of the scale factor, 6.26
//   ys, ym  sign and magnitude of the exponent y (power only)
//   z       result (sign, scaled 6.26 logarithm)
//   sat     the result logarithm was saturated
module lns_unary
  import lns_pkg::*;
#(
  parameter int Y_FRAC = 0
) (
  input  lns_num_t                x,
  input  lns_uop_e                uop,
  input  logic signed [LOG_W-1:0] lm,
  input  logic                    ys,
  input  logic [BIN_W-1:0]        ym,
  output lns_num_t                z,
  output logic                    sat
);

  localparam int RW = LOG_W + BIN_W + 4;  // wide enough for y * Lx

  logic signed [RW-1:0] lx, yv, r, s;

  always_comb begin
    lx = RW'(x.lg) - RW'(lm);                       // remove the scale
    yv = ys ? -RW'(signed'({1'b0, ym})) : RW'(signed'({1'b0, ym}));
    unique case (uop)
      UOP_RECIP:  r = -lx;
      UOP_SQRT:   r = lx >>> 1;
      UOP_SQUARE: r = lx <<< 1;
      default:    r = (yv * lx) >>> Y_FRAC;         // UOP_POW
    endcase
    s = r + RW'(lm);                                // put the scale back

    sat = 1'b0;
    if (s > RW'(signed'(LOG_MAX))) begin
      z.lg = LOG_MAX;
      sat  = 1'b1;
    end else if (s < RW'(signed'(LOG_MIN))) begin
      z.lg = LOG_MIN;
      sat  = 1'b1;
    end else begin
      z.lg = s[LOG_W-1:0];
    end

    unique case (uop)
      UOP_RECIP: z.sign = x.sign;
      UOP_POW:   z.sign = x.sign & ym[Y_FRAC];
      default:   z.sign = 1'b0;
    endcase
  end

endmodule
