// vedic_mult16: 16 x 16 unsigned Vedic multiplier.
//
// The operands are split into halves a = {aH, aL}, b = {bH, bL} of 8 bits.
// Four 8-bit Vedic multipliers form the partial products aL*bL, aH*bL, aL*bH and
// aH*bH side by side, all at once; vedic_combine then adds them with three
// 16-bit ripple carry adders and an OR gate (see that module). This is the
// Urdhva Tiryakbhyam method applied to 8-bit digits: the low digit product
// is the vertical term, the two crosswise products meet in the middle
// column, and the high digit product is the last vertical term.
//
// Interface: a (multiplier), b (multiplicand), 16 bits each -> s, the
// 32-bit product, and cout, the carry c3 of the last adder (always 0
// for an exact product). Four half-size multipliers plus three ripple
// carry adders per level, and the port names, follow the design; how the
// partial products are routed into the adders is this implementation's.
// Timing: purely combinational, no clock or reset; the product settles
// after the slowest leaf multiplier plus the ripple through the adders of
// every level.
module vedic_mult16 (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0] s,
  output logic        cout
);
  logic [15:0] q0, q1, q2, q3;
  logic [3:0]  unused_cout;  // carries of the sub-multipliers, always 0

  vedic_mult8 u_ll (.a(a[7:0]),  .b(b[7:0]),  .s(q0), .cout(unused_cout[0]));
  vedic_mult8 u_hl (.a(a[15:8]), .b(b[7:0]),  .s(q1), .cout(unused_cout[1]));
  vedic_mult8 u_lh (.a(a[7:0]),  .b(b[15:8]), .s(q2), .cout(unused_cout[2]));
  vedic_mult8 u_hh (.a(a[15:8]), .b(b[15:8]), .s(q3), .cout(unused_cout[3]));

  vedic_combine #(.N(16)) u_comb (
    .q0  (q0),
    .q1  (q1),
    .q2  (q2),
    .q3  (q3),
    .s   (s),
    .cout(cout)
  );
endmodule
