// tb_napa_template_rails: precharge, evaluate and hold of two rail sets.
module tb_napa_template_rails;
  import napa_pkg::*;
  logic clk = 0, pre = 0, eva = 0;
  tmpl_t value = '0;
  tmpl_t [1:0] rails;
  int checks = 0, failures = 0;

  napa_template_rails #(.SETS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int k = 0; k < 50; k++) begin
      tmpl_t v;
      v = tmpl_t'($urandom);
      pre = 1; @(negedge clk); pre = 0;
      checks++;
      if (rails[0] != '1 || rails[1] != '1) begin failures++; $display("FAIL precharge"); end
      value = v; eva = 1; @(negedge clk); eva = 0;
      value = ~v;
      repeat (3) @(negedge clk);
      checks++;
      if (rails[0] != v || rails[1] != v) begin
        failures++; $display("FAIL hold %h %h exp %h", rails[0], rails[1], v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
