// lns_control: control decoder of the four-function logarithmic ALU.
//
// From the operation, the two operand signs and the comparison Lx > Ly it
// produces the four datapath controls (minus, mux, sub1, sub2), the operand
// swap and the sign of the result. Purely combinational.
//
//   operation        minus  mux sub1 sub2   result sign
//   add, effective +   0     0    1    0    sign of larger operand
//   add, effective -   1     0    1    0    sign of larger operand
//   multiply           0     1    0    1    Sx xor Sy
//   divide             0     1    1    0    Sx xor Sy
//
// The mux/sub1/sub2 settings and minus for addition (0) and subtraction (1)
// of positive operands are as published; minus is a don't-care there for
// multiply and divide and is driven 0 here. This design's own additions:
// with signed operands the ROM function follows the effective operation,
// minus = Sx xor Sy xor (op == subtract); for addition and subtraction the
// operands are swapped when Lx > Ly does not hold, so that the first adder
// always forms Lmax - Lmin >= 0 and the larger operand reaches the second
// adder; the result then takes the sign of the larger operand, negated for a
// subtraction whose larger operand is y.
//
// Ports:
//   op     operation (lns_op_e)
//   sx,sy  operand signs
//   gt     Lx > Ly
//   ctrl   datapath controls
//   swap   exchange x and y ahead of the datapath
//   sz     result sign
module lns_control
  import lns_pkg::*;
(
  input  lns_op_e   op,
  input  logic      sx,
  input  logic      sy,
  input  logic      gt,
  output alu_ctrl_t ctrl,
  output logic      swap,
  output logic      sz
);

  logic sy_eff;  // sign of y as it enters an addition

  always_comb begin
    sy_eff = sy ^ (op == OP_SUB);
    swap   = 1'b0;
    unique case (op)
      OP_ADD, OP_SUB: begin
        ctrl = '{minus: sx ^ sy_eff, mux: 1'b0, sub1: 1'b1, sub2: 1'b0};
        swap = !gt;
        sz   = gt ? sx : sy_eff;
      end
      OP_MUL: begin
        ctrl = '{minus: 1'b0, mux: 1'b1, sub1: 1'b0, sub2: 1'b1};
        sz   = sx ^ sy;
      end
      default: begin  // OP_DIV
        ctrl = '{minus: 1'b0, mux: 1'b1, sub1: 1'b1, sub2: 1'b0};
        sz   = sx ^ sy;
      end
    endcase
  end

endmodule
