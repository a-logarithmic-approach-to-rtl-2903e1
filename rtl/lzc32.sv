// lzc32: leading-zeros counter of a 32-bit word.
//
// Counts the zero bits above the most significant one. A word of all zeros
// gives count 0 with the zero flag set; the count is then meaningless. Built
// as a tree: each level halves the search range by testing whether the upper
// half of what remains is all zeros. Purely combinational.
//
// The counter is named in the published converter; its structure is this
// design's own choice.
//
// Ports:
//   a     32-bit input word
//   cnt   number of leading zeros, 0..31
//   zero  1 when a is all zeros
module lzc32 (
  input  logic [31:0] a,
  output logic [4:0]  cnt,
  output logic        zero
);

  always_comb begin
    logic [31:0] v;
    v    = a;
    cnt  = '0;
    zero = (a == '0);
    if (v[31:16] == '0) begin cnt[4] = 1'b1; v = v << 16; end
    if (v[31:24] == '0) begin cnt[3] = 1'b1; v = v << 8;  end
    if (v[31:28] == '0) begin cnt[2] = 1'b1; v = v << 4;  end
    if (v[31:30] == '0) begin cnt[1] = 1'b1; v = v << 2;  end
    if (v[31]    == 1'b0) cnt[0] = 1'b1;
    if (zero) cnt = '0;
  end

endmodule
