// tb_vedic_mult8: self-check of the 8 x 8 Vedic multiplier.
// Operands come from corner cases (zero, one, all ones, single bits) and
// 20000 generated pairs, a mix of uniform random words and words with most
// bits set (these drive long carry ripples), and pairs built so that the
// second adder of the top stage carries out (see below). Every product is compared
// with the * operator on 16-bit values, and the carry output must be
// 0. The all-ones case is also compared with the literal product
// 16'hfe01. The run counts how often the first and second adder of the
// top combining stage carry out, the two inputs of its OR gate, and fails
// if either never happens. A watchdog ends the run if it hangs.
module tb_vedic_mult8;
  localparam int N = 8;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] s;
  logic           cout;
  int             checks = 0, failures = 0;
  int             n_c1 = 0, n_c2 = 0;

  vedic_mult8 dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_word(int mode);
    logic [N-1:0] w;
    for (int i = 0; i < N; i += 32) w[i +: 32] = $urandom;
    case (mode)
      0:       return w;
      1:       return ~(w & (w >> 3) & (w >> 7));  // mostly ones
      2:       return N'(1) << (w[7:0] % N);       // one bit
      default: return w & (w >> 2);                // mostly zeros
    endcase
  endfunction

  task automatic apply();
    logic [2*N-1:0] expect_s;
    expect_s = (2*N)'(a) * (2*N)'(b);
    #1;
    checks++;
    if (s != expect_s || cout != 1'b0) begin
      failures++;
      if (failures <= 10) $display("FAIL %h * %h -> %h cout=%0b (expected %h)", a, b, s, cout, expect_s);
    end
    if (dut.u_comb.c1) n_c1++;
    if (dut.u_comb.c2) n_c2++;
  endtask

  initial begin
    a = '0; b = '0; apply();
    a = '1; b = '0; apply();
    a = N'(1); b = '1; apply();
    a = '1; b = '1; apply();
    checks++;
    if (s != (2*N)'(16'hfe01)) begin
      failures++;
      $display("FAIL all-ones product %h", s);
    end
    for (int v = 0; v < 20000; v++) begin
      a = rand_word(v % 4);
      b = rand_word((v / 4) % 4);
      if (v % 16 == 15) begin
        // low halves all ones and aH + bH = 2^(N/2) + 1: the middle sum
        // aH*bL + aL*bH is then 2^N - 1 and the second adder carries
        a[N/2-1:0] = '1;
        b[N/2-1:0] = '1;
        a[N-1:N/2] = (N/2)'(2) + rand_word(0) % ((N/2)'(1) << (N/2 - 1));
        b[N-1:N/2] = (N/2)'(1) - a[N-1:N/2];
      end
      apply();
    end
    $display("carry events in the top combining stage: c1=%0d c2=%0d", n_c1, n_c2);
    if (n_c1 == 0) begin failures++; $display("FAIL: c1 never set"); end
    if (n_c2 == 0) begin failures++; $display("FAIL: c2 never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
