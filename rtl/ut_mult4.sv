// ut_mult4: W x W unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method; W = 4 by default.
//
// The product is formed in 2W-1 column steps. Step k collects every bit
// product a[i] & b[j] with i + j = k (the vertical and crosswise lines of
// the method), adds the carry left over from step k-1, keeps the least
// significant bit of that sum as product bit s[k] and passes the remaining
// bits on as the carry of step k+1. The carry after the last step is the
// top product bit s[2W-1]. For W = 4 the steps are
//   s0 = a0b0
//   s1 = a0b1 + a1b0 + c0
//   s2 = a0b2 + a1b1 + a2b0 + c1
//   s3 = a0b3 + a1b2 + a2b1 + a3b0 + c2
//   s4 = a1b3 + a2b2 + a3b1 + c3
//   s5 = a2b3 + a3b2 + c4
//   s6 = a3b3 + c5,  s7 = carry out of s6
// which is the method as the design gives it. The column counters are
// written as plain additions and left to synthesis.
//
// Interface: a, b (W bits) -> s (2W bits). Purely combinational.
module ut_mult4 #(
  parameter int W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] s
);
  // A column holds at most W bit products plus a carry below 2W, so
  // $clog2(W) + 2 bits are enough for the column sum.
  localparam int CW = $clog2(W) + 2;

  logic [CW-1:0] col;
  logic [CW-1:0] carry;

  always_comb begin
    carry = '0;
    s     = '0;
    for (int k = 0; k < 2*W-1; k++) begin
      col = carry;
      for (int i = 0; i < W; i++) begin
        if (k - i >= 0 && k - i < W)
          col = col + CW'(a[i] & b[k-i]);
      end
      s[k]  = col[0];
      carry = col >> 1;
    end
    s[2*W-1] = carry[0];
  end
endmodule
