// rca: ripple carry adder of WIDTH bits.
//
// WIDTH full adders are chained: the carry out of stage i is the carry in
// of stage i+1, so the most significant sum bit settles only after the
// carry has rippled from bit 0 to bit WIDTH-1. Stage 0 takes cin, the last
// stage drives cout. The default of 4 bits is the adder drawn with the
// design (A3..A0, B3..B0, S3..S0, carry out C4); the multipliers use it at
// 8 to 128 bits.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: purely combinational, delay linear in WIDTH; no clock or reset.
module rca #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // carry[i] is the carry into stage i
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
