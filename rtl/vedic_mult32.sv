// vedic_mult32: 32 x 32 unsigned Vedic multiplier.
//
// The operands are split into halves a = {aH, aL}, b = {bH, bL} of 16 bits.
// Four 16-bit Vedic multipliers form the partial products aL*bL, aH*bL, aL*bH and
// aH*bH side by side, all at once; vedic_combine then adds them with three
// 32-bit ripple carry adders and an OR gate (see that module). This is the
// Urdhva Tiryakbhyam method applied to 16-bit digits: the low digit product
// is the vertical term, the two crosswise products meet in the middle
// column, and the high digit product is the last vertical term.
//
// Interface: a (multiplier), b (multiplicand), 32 bits each -> s, the
// 64-bit product, and cout, the carry c3 of the last adder (always 0
// for an exact product). Four half-size multipliers plus three ripple
// carry adders per level, and the port names, follow the design; how the
// partial products are routed into the adders is this implementation's.
// Timing: purely combinational, no clock or reset; the product settles
// after the slowest leaf multiplier plus the ripple through the adders of
// every level.
module vedic_mult32 (
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  output logic [63:0] s,
  output logic        cout
);
  logic [31:0] q0, q1, q2, q3;
  logic [3:0]  unused_cout;  // carries of the sub-multipliers, always 0

  vedic_mult16 u_ll (.a(a[15:0]),  .b(b[15:0]),  .s(q0), .cout(unused_cout[0]));
  vedic_mult16 u_hl (.a(a[31:16]), .b(b[15:0]),  .s(q1), .cout(unused_cout[1]));
  vedic_mult16 u_lh (.a(a[15:0]),  .b(b[31:16]), .s(q2), .cout(unused_cout[2]));
  vedic_mult16 u_hh (.a(a[31:16]), .b(b[31:16]), .s(q3), .cout(unused_cout[3]));

  vedic_combine #(.N(32)) u_comb (
    .q0  (q0),
    .q1  (q1),
    .q2  (q2),
    .q3  (q3),
    .s   (s),
    .cout(cout)
  );
endmodule
