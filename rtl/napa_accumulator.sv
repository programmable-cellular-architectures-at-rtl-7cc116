// napa_accumulator: one state-accumulator tile of a NAPA cell.
//
// Adds a partial sum received from a neighbour (ps, sign-extended) to the
// running state sum (sum_in) and keeps the result in a dynamic output stage.
// Four of these sit at the corners of each cell and are chained anticlockwise,
// as the document describes; the chain turns the five partial sums into the
// new state. The adder is a ripple of NAND-NAND full adders (nasic_fa), the
// simplest adder the NASIC logic style gives; the document names the tile but
// not its adder structure.
//
// Timing: pre (precharge) sets the output stage to all ones, as a NAND plane
// precharges to VDD; eva latches sum_in + ps on the clock edge; otherwise the
// stage holds. pre and eva are never asserted together.
module napa_accumulator
  import napa_pkg::*;
(
  input  logic   clk,
  input  logic   pre,
  input  logic   eva,
  input  state_t sum_in,
  input  ps_t    ps,
  output state_t sum_d,     // combinational sum, for the cell's output bit
  output state_t sum_q
);
  state_t ps_ext;
  logic [X_W:0] carry;

  assign ps_ext   = state_t'(ps);
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < X_W; i++) begin : g_fa
    logic s_n_unused, c_n_unused;
    nasic_fa u_fa (
      .a0(sum_in[i]), .a0_n(~sum_in[i]),
      .b0(ps_ext[i]), .b0_n(~ps_ext[i]),
      .c0(carry[i]),  .c0_n(~carry[i]),
      .s0(sum_d[i]),  .s0_n(s_n_unused),
      .c1(carry[i+1]), .c1_n(c_n_unused)
    );
  end

  always_ff @(posedge clk) begin
    if (pre)      sum_q <= '1;
    else if (eva) sum_q <= sum_d;
  end

  assert property (@(posedge clk) !(pre && eva));
endmodule
