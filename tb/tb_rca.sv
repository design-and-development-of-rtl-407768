// tb_rca: self-check of the ripple carry adder at its default 4-bit width
// (exhaustive over a, b and cin) and at 16 bits (random operands plus the
// full-length carry ripple 0xFFFF + 0 + 1). Results are compared with the
// arithmetic sum. A watchdog ends the run if it hangs.
module tb_rca;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  int          checks = 0, failures = 0;

  rca dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  rca #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16();
    #1;
    checks++;
    if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(ci16)) begin
      failures++;
      $display("FAIL16 %h + %h + %0b -> %0b %h", a16, b16, ci16, co16, s16);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL4 %h + %h + %0b -> %0b %h", a4, b4, ci4, co4, s4);
      end
    end
    a16 = 16'hffff; b16 = 16'h0000; ci16 = 1'b1; check16();
    a16 = 16'hffff; b16 = 16'hffff; ci16 = 1'b1; check16();
    for (int v = 0; v < 2000; v++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
