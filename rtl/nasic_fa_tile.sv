// nasic_fa_tile: dynamically clocked NASIC 1-bit full-adder tile.
//
// Same function as nasic_fa, with the two NAND planes as dynamic stages.
// The horizontal plane drives eight product nanowires, one per minterm of the
// dual-rail inputs a0, b0, c0; the vertical plane drives the outputs s0, s0_n,
// c1, c1_n. Each plane precharges to one (pre), evaluates on the clock edge
// (eva) or holds its value. With the rotation of nasic_phase_gen the inputs
// are sampled in the heva phase and the outputs are valid after veva,
// while the horizontal plane holds. The tile structure and control names
// (hpre, heva, vpre, veva) follow the document; one control set is modelled,
// and the per-minterm product lines are this design's choice.
module nasic_fa_tile (
  input  logic clk,
  input  logic hpre,
  input  logic heva,
  input  logic vpre,
  input  logic veva,
  input  logic a0, a0_n,
  input  logic b0, b0_n,
  input  logic c0, c0_n,
  output logic s0, s0_n,
  output logic c1, c1_n
);
  logic [7:0] h_q;        // horizontal nanowires (minterm NANDs)
  logic [3:0] v_q;        // vertical nanowires {c1_n, c1, s0_n, s0}
  logic [7:0] h_d;
  logic [3:0] v_d;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      h_d[i] = ~((i[2] ? a0 : a0_n) & (i[1] ? b0 : b0_n) & (i[0] ? c0 : c0_n));
    end
    v_d[0] = ~(h_q[1] & h_q[2] & h_q[4] & h_q[7]);
    v_d[1] = ~(h_q[0] & h_q[3] & h_q[5] & h_q[6]);
    v_d[2] = ~(h_q[3] & h_q[5] & h_q[6] & h_q[7]);
    v_d[3] = ~(h_q[0] & h_q[1] & h_q[2] & h_q[4]);
  end

  always_ff @(posedge clk) begin
    if (hpre)      h_q <= '1;
    else if (heva) h_q <= h_d;
    if (vpre)      v_q <= '1;
    else if (veva) v_q <= v_d;
  end

  assign {c1_n, c1, s0_n, s0} = v_q;

  assert property (@(posedge clk) !(hpre && heva));
  assert property (@(posedge clk) !(vpre && veva));
  // The vertical plane may only evaluate while the horizontal plane holds.
  assert property (@(posedge clk) veva |-> !(hpre || heva));
endmodule
