// vedic_combine: adds the four partial products of an N x N Vedic
// multiplier into the 2N-bit product.
//
// With H = N/2, a = {aH, aL} and b = {bH, bL}, the four half-size
// multipliers deliver q0 = aL*bL, q1 = aH*bL, q2 = aL*bH and q3 = aH*bH
// (each N bits), and a*b = q0 + (q1 + q2) << H + q3 << N. Three N-bit
// ripple carry adders and one OR gate do this sum:
//   adder 1: q1 + q2                         -> t1, carry c1
//   adder 2: t1 + {0, q0[N-1:H]}             -> t2, carry c2
//   adder 3: q3 + {0, c1 | c2, t2[N-1:H]}    -> s[2N-1:N], carry c3 (cout)
//   s[N-1:H] = t2[H-1:0],  s[H-1:0] = q0[H-1:0]
// c1 and c2 are never both set for real partial products (if c1 is set,
// t1 is at most 2^N - 2^(H+2) + 2, and adding q0[N-1:H] < 2^H cannot
// carry), so the OR gate loses nothing and the product is exact; an
// assertion watches this. For the same reason cout is always 0; it is
// kept as the carry output c3 that the design gives every multiplier.
// The counts (three N-bit adders, the OR gate, the 2N sum bits and one
// carry) follow the design; which operands go into which adder is this
// implementation's arrangement.
//
// Interface: q0..q3 (N bits) -> s (2N bits), cout. Purely combinational.
module vedic_combine #(
  parameter int N = 16
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] s,
  output logic           cout
);
  localparam int H = N / 2;

  logic [N-1:0] t1, t2, hi;
  logic         c1, c2, cor;

  rca #(.WIDTH(N)) u_rca1 (
    .a   (q1),
    .b   (q2),
    .cin (1'b0),
    .sum (t1),
    .cout(c1)
  );

  rca #(.WIDTH(N)) u_rca2 (
    .a   (t1),
    .b   ({{H{1'b0}}, q0[N-1:H]}),
    .cin (1'b0),
    .sum (t2),
    .cout(c2)
  );

  assign cor = c1 | c2;

  rca #(.WIDTH(N)) u_rca3 (
    .a   (q3),
    .b   ({{(H-1){1'b0}}, cor, t2[N-1:H]}),
    .cin (1'b0),
    .sum (hi),
    .cout(cout)
  );

  assign s = {hi, t2[H-1:0], q0[H-1:0]};

  // The OR gate in place of an adder for c1 + c2 is exact only if the two
  // carries never coincide.
  always_comb begin
    assert (!(c1 && c2)) else $error("vedic_combine: c1 and c2 both set");
  end
endmodule
