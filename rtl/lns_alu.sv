// lns_alu: four-function ALU for sign/logarithm numbers: add, subtract,
// multiply, divide.
//
// Datapath (two adder/subtractors, a phi ROM and two 2-to-1 muxes):
//   first adder   s1 = A -/+ B                        (sub1)
//   ROM           phi = phi+(s1) or phi-(s1)           (minus)
//   upper mux     T = mux ? s1 : phi
//   lower mux     U = mux ? Lm : A
//   second adder  Lz = T -/+ U                         (sub2)
// Multiplication gives Lx + Ly - Lm and division Lx - Ly + Lm: with operands
// stored as log2(m*x) = Lx + Lm, both results are again scaled by the same m.
// Addition and subtraction give A + phi(A - B) with A the larger logarithm.
//
// The adders, ROM, muxes, comparator, control and the scale factor Lm are as
// published. This design's own choices: operands are swapped for addition and
// subtraction when Lx > Ly does not hold (A, B = Ly, Lx), so the ROM sees a
// non-negative difference and the lower mux's A input is the larger operand;
// the adders are wide enough never to wrap (34 and 35 bits), and the result is
// saturated to the 6.26 range [-32, 32 - 2^-26] with 'sat' raised; an exact
// cancellation (x - x) gives the most negative code. Purely combinational.
//
// Ports:
//   x, y  operands (sign, 6.26 logarithm)
//   op    operation (lns_op_e)
//   lm    logarithm of the scale factor, 6.26
//   z     result (sign, 6.26 logarithm)
//   sat   the result logarithm was saturated
module lns_alu
  import lns_pkg::*;
#(
  parameter int ROM_INT_BITS  = 5,
  parameter int ROM_FRAC_BITS = 6
) (
  input  lns_num_t                x,
  input  lns_num_t                y,
  input  lns_op_e                 op,
  input  logic signed [LOG_W-1:0] lm,
  output lns_num_t                z,
  output logic                    sat
);

  // Comparator and control
  logic      gt, swap, sz;
  alu_ctrl_t ctrl;
  assign gt = x.lg > y.lg;

  lns_control u_ctrl (
    .op  (op),
    .sx  (x.sign),
    .sy  (y.sign),
    .gt  (gt),
    .ctrl(ctrl),
    .swap(swap),
    .sz  (sz)
  );

  logic signed [LOG_W-1:0] a, b;
  assign a = swap ? y.lg : x.lg;
  assign b = swap ? x.lg : y.lg;

  // First adder/subtractor
  logic signed [LOG_W+1:0] s1;
  assign s1 = ctrl.sub1 ? (LOG_W+2)'(a) - (LOG_W+2)'(b)
                        : (LOG_W+2)'(a) + (LOG_W+2)'(b);

  // ROM for phi+ and phi-
  logic signed [LOG_W-1:0] phi;
  phi_rom #(
    .ROM_INT_BITS (ROM_INT_BITS),
    .ROM_FRAC_BITS(ROM_FRAC_BITS)
  ) u_rom (
    .d    (s1[LOG_W:0]),
    .minus(ctrl.minus),
    .phi  (phi)
  );

  // Muxes and second adder/subtractor
  logic signed [LOG_W+2:0] t_in, u_in, s2;
  assign t_in = ctrl.mux ? (LOG_W+3)'(s1) : (LOG_W+3)'(phi);
  assign u_in = ctrl.mux ? (LOG_W+3)'(lm) : (LOG_W+3)'(a);
  assign s2   = ctrl.sub2 ? t_in - u_in : t_in + u_in;

  // Exact cancellation in an effective subtraction
  logic cancel;
  assign cancel = !ctrl.mux && ctrl.minus && (s1 == '0);

  always_comb begin
    sat    = 1'b0;
    z.sign = sz;
    if (cancel) begin
      z.lg = LOG_MIN;
    end else if (s2 > (LOG_W+3)'(signed'(LOG_MAX))) begin
      z.lg = LOG_MAX;
      sat  = 1'b1;
    end else if (s2 < (LOG_W+3)'(signed'(LOG_MIN))) begin
      z.lg = LOG_MIN;
      sat  = 1'b1;
    end else begin
      z.lg = s2[LOG_W-1:0];
    end
  end

  // In an addition or subtraction the ROM must see Lmax - Lmin >= 0.
  always_comb begin
    if (!ctrl.mux) assert (!s1[LOG_W+1]) else $error("negative phi address");
  end

endmodule
