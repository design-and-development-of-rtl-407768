// vedic_mult8: 8 x 8 unsigned Vedic multiplier.
//
// The operands are split into halves a = {aH, aL}, b = {bH, bL} of 4 bits.
// Four 4x4 Urdhva Tiryakbhyam multipliers (ut_mult4) form the partial products aL*bL, aH*bL, aL*bH and
// aH*bH side by side, all at once; vedic_combine then adds them with three
// 8-bit ripple carry adders and an OR gate (see that module). This is the
// Urdhva Tiryakbhyam method applied to 4-bit digits: the low digit product
// is the vertical term, the two crosswise products meet in the middle
// column, and the high digit product is the last vertical term.
//
// Interface: a (multiplier), b (multiplicand), 8 bits each -> s, the
// 16-bit product, and cout, the carry c3 of the last adder (always 0
// for an exact product). Four half-size multipliers plus three ripple
// carry adders per level, and the port names, follow the design; how the
// partial products are routed into the adders is this implementation's.
// The 8-bit level is not drawn on its own in the design; it is built the
// same way as the larger levels, on the 4x4 column multiplier.
// Timing: purely combinational, no clock or reset; the product settles
// after the slowest leaf multiplier plus the ripple through the adders of
// every level.
module vedic_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] s,
  output logic        cout
);
  logic [7:0] q0, q1, q2, q3;

  ut_mult4 u_ll (.a(a[3:0]),  .b(b[3:0]),  .s(q0));
  ut_mult4 u_hl (.a(a[7:4]), .b(b[3:0]),  .s(q1));
  ut_mult4 u_lh (.a(a[3:0]),  .b(b[7:4]), .s(q2));
  ut_mult4 u_hh (.a(a[7:4]), .b(b[7:4]), .s(q3));

  vedic_combine #(.N(8)) u_comb (
    .q0  (q0),
    .q1  (q1),
    .q2  (q2),
    .q3  (q3),
    .s   (s),
    .cout(cout)
  );
endmodule
