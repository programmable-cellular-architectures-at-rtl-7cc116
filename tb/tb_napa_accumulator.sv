// tb_napa_accumulator: random additions through the accumulator tile, with
// precharge (all ones) and hold checks.
module tb_napa_accumulator;
  import napa_pkg::*;
  logic clk = 0, pre = 0, eva = 0;
  state_t sum_in = '0, sum_d, sum_q;
  ps_t ps = '0;
  int checks = 0, failures = 0;

  napa_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      int si, pi, exp;
      si = int'($urandom_range(0, 1400)) - 700;
      pi = int'($urandom_range(0, 1000)) - 500;
      exp = si + pi;
      pre = 1; @(negedge clk); pre = 0;
      checks++;
      if (sum_q != '1) begin failures++; $display("FAIL precharge"); end
      sum_in = state_t'(si); ps = ps_t'(pi); eva = 1;
      @(negedge clk); eva = 0;
      sum_in = state_t'($urandom); ps = ps_t'($urandom);
      @(negedge clk);
      checks++;
      if (int'(sum_q) != exp) begin
        failures++; $display("FAIL %0d + %0d = %0d", si, pi, int'(sum_q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
