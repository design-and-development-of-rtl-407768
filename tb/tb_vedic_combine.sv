// tb_vedic_combine: self-check of the partial product adder at N = 16.
// For random and extreme 8-bit operand halves the four partial products are
// computed here with the * operator and fed in; the result must equal the
// full product aL*bL + (aH*bL + aL*bH) << 8 + aH*bH << 16 and the carry c3
// must be 0. The run also counts how often the carries of the first and of
// the second adder occur (each path into the OR gate) and fails if either
// never does. A watchdog ends the run if it hangs.
module tb_vedic_combine;
  localparam int N = 16;
  localparam int H = N / 2;

  logic [H-1:0]   al, ah, bl, bh;
  logic [N-1:0]   q0, q1, q2, q3;
  logic [2*N-1:0] s;
  logic           cout;
  int             checks = 0, failures = 0;
  int             n_c1 = 0, n_c2 = 0;

  vedic_combine #(.N(N)) dut (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .s(s), .cout(cout)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply();
    logic [2*N-1:0] expect_s;
    q0 = N'(al) * N'(bl);
    q1 = N'(ah) * N'(bl);
    q2 = N'(al) * N'(bh);
    q3 = N'(ah) * N'(bh);
    expect_s = (2*N)'({ah, al}) * (2*N)'({bh, bl});
    #1;
    checks++;
    if (s != expect_s || cout != 1'b0) begin
      failures++;
      if (failures <= 10) $display("FAIL %h%h * %h%h -> %h cout=%0b (expected %h)", ah, al, bh, bl, s, cout, expect_s);
    end
    if (dut.c1) n_c1++;
    if (dut.c2) n_c2++;
  endtask

  initial begin
    {ah, al, bh, bl} = '1;        apply();
    {ah, al, bh, bl} = '0;        apply();
    ah = '1; al = '0; bh = '0; bl = '1; apply();
    for (int v = 0; v < 5000; v++) begin
      al = H'($urandom); ah = H'($urandom); bl = H'($urandom); bh = H'($urandom);
      if (v % 4 == 1) begin ah |= 8'hf0; bh |= 8'hf0; al |= 8'hf0; bl |= 8'hf0; end
      if (v % 4 == 3) begin
        // low halves all ones and ah + bh = 2^H + 1: q1 + q2 = 2^N - 1, so
        // adding the upper half of q0 carries out of the second adder
        al = '1; bl = '1;
        ah = H'(2) + H'($urandom % (1 << (H - 1)));
        bh = H'(1) - ah;
      end
      apply();
    end
    $display("carry events: c1=%0d c2=%0d", n_c1, n_c2);
    if (n_c1 == 0) begin failures++; $display("FAIL: c1 never set"); end
    if (n_c2 == 0) begin failures++; $display("FAIL: c2 never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
