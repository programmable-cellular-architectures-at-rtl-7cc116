// tb_nasic_fa_tile: streams random operand triples through the dynamic
// full-adder tile using the three-phase rotation and checks the outputs after
// every vertical evaluate; also checks precharge values and hold behaviour.
module tb_nasic_fa_tile;
  logic clk = 0;
  logic hpre = 0, heva = 0, vpre = 0, veva = 0;
  logic a = 0, b = 0, c = 0, s, s_n, co, co_n;
  int checks = 0, failures = 0;

  nasic_fa_tile dut (.clk, .hpre, .heva, .vpre, .veva,
                     .a0(a), .a0_n(~a), .b0(b), .b0_n(~b), .c0(c), .c0_n(~c),
                     .s0(s), .s0_n(s_n), .c1(co), .c1_n(co_n));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ph(input logic [3:0] ctl);
    {hpre, heva, vpre, veva} = ctl;
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk);
    for (int k = 0; k < 64; k++) begin
      logic [2:0] v;
      int sum;
      v = 3'($urandom);
      ph(4'b1000);                // horizontal precharge
      {a, b, c} = v;
      ph(4'b0110);                // horizontal evaluate, vertical precharge
      checks++;
      if ({s, s_n, co, co_n} != 4'b1111) begin
        failures++; $display("FAIL vertical plane not precharged");
      end
      {a, b, c} = ~v;             // inputs change while the horizontal plane holds
      ph(4'b0001);                // vertical evaluate
      sum = int'(v[2]) + int'(v[1]) + int'(v[0]);
      ph(4'b0000);                // hold
      checks++;
      if ({co, s} != 2'(sum) || s_n != ~s || co_n != ~co) begin
        failures++;
        $display("FAIL v=%b -> s=%0d c=%0d", v, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
