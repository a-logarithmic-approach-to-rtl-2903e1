// pwl_sum5: shift-and-add evaluator of one linear piece, y = s*x + t, built
// as three levels of carry-save adders feeding one carry-propagate adder.
//
// The slope s is given as up to four signed power-of-two terms; term j adds
// x * 2^(k_j - 7), or its ones' complement when it is negated. Each negated
// term needs a +1 to become a two's complement negation; the caller folds
// those +1s into the constant t. The five operands (four terms and t) are
// reduced by three 3:2 carry-save levels to a sum and a carry word, which
// one carry-propagate adder adds.
//
// All arithmetic is modulo 2^W. The caller chooses W so that the true result
// fits; bits shifted out at the top of a term do not change the result modulo
// 2^W, and bits shifted out at the bottom are truncated (each at most one unit
// in the last place low).
//
// The three CSA levels and the final CPA of a 26-bit fractional unit are as
// published for the logarithmic converter; the term encoding, the width
// parameter and the reuse for the antilogarithmic converter are this design's
// own. Purely combinational.
//
// Ports:
//   x      operand, W bits, read as an integer count of ulps
//   terms  four shift-and-add terms (en, neg, k), weight 2^(k-7)
//   cst    intercept plus the count of negated terms, in ulps of x
//   y      result modulo 2^W
module pwl_sum5
  import lns_pkg::*;
#(
  parameter int W = 26
) (
  input  logic [W-1:0] x,
  input  sa_terms_t    terms,
  input  logic [W-1:0] cst,
  output logic [W-1:0] y
);

  logic [W-1:0] op [4];

  // Hardwired shifters: a term selects one of the fixed shifts of x.
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic [W-1:0] sh;
      if (terms[j].k >= 4'd7) sh = x << (terms[j].k - 4'd7);
      else                    sh = x >> (4'd7 - terms[j].k);
      if (!terms[j].en)        op[j] = '0;
      else if (terms[j].neg)   op[j] = ~sh;
      else                     op[j] = sh;
    end
  end

  // Level 1: op0 + op1 + op2
  logic [W-1:0] s1, c1, s2, c2, s3, c3;
  always_comb begin
    s1 = op[0] ^ op[1] ^ op[2];
    c1 = ((op[0] & op[1]) | (op[0] & op[2]) | (op[1] & op[2])) << 1;
    // Level 2: s1 + c1 + op3
    s2 = s1 ^ c1 ^ op[3];
    c2 = ((s1 & c1) | (s1 & op[3]) | (c1 & op[3])) << 1;
    // Level 3: s2 + c2 + cst
    s3 = s2 ^ c2 ^ cst;
    c3 = ((s2 & c2) | (s2 & cst) | (c2 & cst)) << 1;
  end

  // Carry-propagate adder
  assign y = s3 + c3;

endmodule
