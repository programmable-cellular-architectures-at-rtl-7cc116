// napa_template_rails: the programmable template rails of the NAPA array.
//
// Template values are driven from the peripheral CMOS on microwires that gate
// a set of dynamically controlled nanowires running along the array. Like any
// NASIC stage the rails are first precharged (pre), then evaluated from the
// microwire value (eva), then held while every cell computes its partial sum
// from them. The rails are modelled as one dynamic register per template bit:
// pre sets all rails to one (precharge to the supply), eva latches the value
// on the clock edge, otherwise they hold. The document shows one rail set at
// the top of the array and notes that large arrays may need several; SETS
// copies of the rail set, each driving its own group of columns, are provided
// for that case (default 1). The document's figure shows 1-bit a and b rails
// for illustration; the rails here carry the full multi-bit template.
module napa_template_rails
  import napa_pkg::*;
#(
  parameter int unsigned SETS = 1
) (
  input  logic              clk,
  input  logic              pre,
  input  logic              eva,
  input  tmpl_t             value,
  output tmpl_t [SETS-1:0]  rails
);
  for (genvar s = 0; s < SETS; s++) begin : g_set
    always_ff @(posedge clk) begin
      if (pre)      rails[s] <= '1;
      else if (eva) rails[s] <= value;
    end
  end

  assert property (@(posedge clk) !(pre && eva));
endmodule
