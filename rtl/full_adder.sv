// full_adder: one-bit full adder, the cell from which every ripple carry
// adder of the multiplier is built.
//
// sum  = a ^ b ^ cin
// cout = majority(a, b, cin)
//
// Interface: three one-bit inputs, two one-bit outputs. Purely
// combinational; no clock or reset. The gate equations are the textbook
// ones; the design only calls for "a full adder" as the stage of the
// ripple carry adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;  // propagate

  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
