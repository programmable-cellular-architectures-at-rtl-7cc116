// tb_nasic_phase_gen: checks the precharge-evaluate-hold rotation
// (hpre; heva+vpre; veva) and that all lines stay off while disabled.
module tb_nasic_phase_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic hpre, heva, vpre, veva;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  nasic_phase_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect4(input logic [3:0] exp);
    checks++;
    if ({hpre, heva, vpre, veva} != exp) begin
      failures++;
      $display("FAIL t=%0t got %b exp %b", $time, {hpre, heva, vpre, veva}, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect4(4'b0000);
    en = 1;
    for (int k = 0; k < 4; k++) begin
      #1 expect4(4'b1000); @(negedge clk);
      expect4(4'b0110);    @(negedge clk);
      expect4(4'b0001);    @(negedge clk);
    end
    // Pause in the middle of the rotation: all off, then resume where it was.
    expect4(4'b1000); @(negedge clk);
    en = 0; #1 expect4(4'b0000);
    repeat (3) @(negedge clk);
    expect4(4'b0000);
    en = 1; #1 expect4(4'b0110);
    @(negedge clk);
    expect4(4'b0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
