// vedic_mult128: 128 x 128 unsigned Vedic multiplier, the top of the design.
//
// The operands are split into halves a = {aH, aL}, b = {bH, bL} of 64 bits.
// Four 64-bit Vedic multipliers form the partial products aL*bL, aH*bL, aL*bH and
// aH*bH side by side, all at once; vedic_combine then adds them with three
// 128-bit ripple carry adders and an OR gate (see that module). This is the
// Urdhva Tiryakbhyam method applied to 64-bit digits: the low digit product
// is the vertical term, the two crosswise products meet in the middle
// column, and the high digit product is the last vertical term.
//
// Interface: a (multiplier), b (multiplicand), 128 bits each -> s, the
// 256-bit product, and cout, the carry c3 of the last adder (always 0
// for an exact product). Four half-size multipliers plus three ripple
// carry adders per level, and the port names, follow the design; how the
// partial products are routed into the adders is this implementation's.
// The design counts three 128-bit ripple carry adders and one 64-bit one
// at this level; here it uses the same three adders and OR gate as every
// other level, which gives the exact product.
// Timing: purely combinational, no clock or reset; the product settles
// after the slowest leaf multiplier plus the ripple through the adders of
// every level.
module vedic_mult128 (
  input  logic [127:0]  a,
  input  logic [127:0]  b,
  output logic [255:0] s,
  output logic        cout
);
  logic [127:0] q0, q1, q2, q3;
  logic [3:0]  unused_cout;  // carries of the sub-multipliers, always 0

  vedic_mult64 u_ll (.a(a[63:0]),  .b(b[63:0]),  .s(q0), .cout(unused_cout[0]));
  vedic_mult64 u_hl (.a(a[127:64]), .b(b[63:0]),  .s(q1), .cout(unused_cout[1]));
  vedic_mult64 u_lh (.a(a[63:0]),  .b(b[127:64]), .s(q2), .cout(unused_cout[2]));
  vedic_mult64 u_hh (.a(a[127:64]), .b(b[127:64]), .s(q3), .cout(unused_cout[3]));

  vedic_combine #(.N(128)) u_comb (
    .q0  (q0),
    .q1  (q1),
    .q2  (q2),
    .q3  (q3),
    .s   (s),
    .cout(cout)
  );
endmodule
