// tb_nasic_fa: exhaustive check of the NAND-NAND full adder, dual-rail
// inputs and outputs, against integer addition.
module tb_nasic_fa;
  logic a, b, c, s, s_n, co, co_n;
  int checks = 0, failures = 0;

  nasic_fa dut (.a0(a), .a0_n(~a), .b0(b), .b0_n(~b), .c0(c), .c0_n(~c),
                .s0(s), .s0_n(s_n), .c1(co), .c1_n(co_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int sum;
      {a, b, c} = 3'(i);
      #1;
      sum = int'(a) + int'(b) + int'(c);
      checks++;
      if ({co, s} != 2'(sum) || s_n != ~s || co_n != ~co) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> s=%0d s_n=%0d c=%0d c_n=%0d", a, b, c, s, s_n, co, co_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
