// tb_ut_mult4: exhaustive self-check of the 4x4 Urdhva Tiryakbhyam column
// multiplier (all 256 operand pairs) against the arithmetic product, plus
// the 3-bit variant over all 64 pairs. A watchdog ends the run if it hangs.
module tb_ut_mult4;
  logic [3:0] a, b;
  logic [7:0] s;
  logic [2:0] a3, b3;
  logic [5:0] s3;
  int         checks = 0, failures = 0;

  ut_mult4 dut (.a(a), .b(b), .s(s));
  ut_mult4 #(.W(3)) dut3 (.a(a3), .b(b3), .s(s3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      a3 = a[2:0]; b3 = b[2:0];
      #1;
      checks++;
      if (s != 8'(a) * 8'(b)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, s);
      end
      if (v < 64) begin
        checks++;
        if (s3 != 6'(a3) * 6'(b3)) begin
          failures++;
          $display("FAIL3 %0d * %0d -> %0d", a3, b3, s3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
