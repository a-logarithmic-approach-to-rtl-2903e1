// lns_pkg: number format, operation codes and converter coefficient tables
// shared by the logarithmic arithmetic unit.
//
// Number format: a logarithmic number is a sign bit plus a 32-bit two's
// complement fixed-point base-2 logarithm of the magnitude, 6 whole bits and
// 26 fractional bits, covering logarithms in [-32, 32). The 6.26 split is the
// published one; keeping the sign apart from the logarithm follows the usual
// sign/logarithm representation.
//
// Converter coefficients: both converters split [0,1) into eight equal
// intervals selected by the three leading fraction bits and use a straight
// line per interval. The slopes are stored as the integers 128*a (log) and
// 128*c (antilog); the intercepts as 1024*b and 1024*d. For the antilog
// intercepts an extra bit (units of 1/2048) lets the fifth and sixth values be
// lowered by half a unit, which balances the error range of that converter.
//
// Slopes are multiplied by shift-and-add: each slope is recoded into signed
// power-of-two digits (canonical signed digit form). Every table entry needs
// at most four such digits, so the product fits a five-operand adder (four
// shifted copies of x plus the intercept). The recoding is a constant function
// evaluated at elaboration; the hardware sees only fixed shift selections.
package lns_pkg;

  localparam int LOG_W    = 32;  // width of a logarithm
  localparam int LOG_INT  = 6;   // whole bits of a logarithm (two's complement)
  localparam int LOG_FRAC = 26;  // fractional bits of a logarithm
  localparam int BIN_W    = 32;  // width of a binary magnitude

  // Most negative logarithm; also the code for a zero magnitude.
  localparam logic [LOG_W-1:0] LOG_MIN = {1'b1, {(LOG_W-1){1'b0}}};
  localparam logic [LOG_W-1:0] LOG_MAX = {1'b0, {(LOG_W-1){1'b1}}};

  typedef struct packed {
    logic                    sign;  // 1: negative
    logic signed [LOG_W-1:0] lg;    // log2 of the magnitude, 6.26
  } lns_num_t;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_DIV = 2'd3
  } lns_op_e;

  // Single-operand operations done by shifting or scaling the logarithm.
  typedef enum logic [1:0] {
    UOP_RECIP  = 2'd0,  // 1/x   : -Lx
    UOP_SQRT   = 2'd1,  // sqrt x: Lx >> 1
    UOP_SQUARE = 2'd2,  // x^2   : Lx << 1
    UOP_POW    = 2'd3   // x^y   : y * Lx
  } lns_uop_e;

  // Operation code of the complete unit: the four ALU operations, then the
  // four single-operand ones (bit 2 set).
  typedef enum logic [2:0] {
    UNIT_ADD    = 3'd0,
    UNIT_SUB    = 3'd1,
    UNIT_MUL    = 3'd2,
    UNIT_DIV    = 3'd3,
    UNIT_RECIP  = 3'd4,
    UNIT_SQRT   = 3'd5,
    UNIT_SQUARE = 3'd6,
    UNIT_POW    = 3'd7
  } unit_op_e;

  // Datapath controls of the four-function ALU.
  typedef struct packed {
    logic minus;  // ROM selects phi- (1) or phi+ (0)
    logic mux;    // 1: second adder takes first adder result and scale factor
    logic sub1;   // first adder subtracts
    logic sub2;   // second adder subtracts
  } alu_ctrl_t;

  // One shift-and-add term: en ? (neg ? -1 : +1) * x * 2^(k-7) : 0
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [3:0] k;
  } sa_term_t;

  typedef sa_term_t [3:0] sa_terms_t;

  // Published line coefficients of the logarithmic converter: 128*a, 1024*b.
  localparam int LOG_A128  [8] = '{175, 158, 142, 127, 119, 110, 102, 95};
  localparam int LOG_B1024 [8] = '{0, 15, 46, 91, 123, 167, 215, 264};

  // Published line coefficients of the antilogarithmic converter: 128*c, 1024*d.
  localparam int ALOG_C128  [8] = '{92, 101, 111, 121, 131, 143, 155, 169};
  localparam int ALOG_D1024 [8] = '{1024, 1015, 995, 964, 924, 864, 792, 695};

  // Intercept of the antilog converter in units of 1/2048. With the half-ulp
  // correction the fifth and sixth values (intervals 4 and 5) are one unit
  // lower than 2*1024*d.
  function automatic int alog_d2048(int i, bit improved);
    int v;
    v = 2 * ALOG_D1024[i];
    if (improved && (i == 4 || i == 5)) v = v - 1;
    return v;
  endfunction

  // Canonical signed-digit recoding of a positive slope (units of 1/128)
  // into at most four terms.
  function automatic sa_terms_t csd4(int value);
    sa_terms_t t;
    int v, k, n;
    t = '0;
    v = value;
    k = 0;
    n = 0;
    while (v != 0 && n < 4) begin
      if (v % 2 != 0) begin
        t[n].en  = 1'b1;
        t[n].k   = 4'(k);
        if (v % 4 == 3) begin
          t[n].neg = 1'b1;
          v = v + 1;
        end else begin
          t[n].neg = 1'b0;
          v = v - 1;
        end
        n = n + 1;
      end
      v = v / 2;
      k = k + 1;
    end
    return t;
  endfunction

  // Number of negated terms: each contributes a +1 that completes its
  // two's complement, folded into the intercept constant.
  function automatic int csd4_negs(int value);
    sa_terms_t t;
    int n;
    t = csd4(value);
    n = 0;
    for (int j = 0; j < 4; j++) if (t[j].en && t[j].neg) n = n + 1;
    return n;
  endfunction

endpackage
