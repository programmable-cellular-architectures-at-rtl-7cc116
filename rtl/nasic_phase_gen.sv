// nasic_phase_gen: three-phase dynamic control for a two-plane NASIC tile.
//
// A NASIC tile is built of dynamic NAND planes controlled from CMOS: the
// horizontal plane is precharged (hpre), then evaluated (heva) while the
// vertical plane is precharged (vpre), then the horizontal plane holds while
// the vertical plane evaluates (veva). This precharge-evaluate-hold rotation
// follows the document; with en held high the generator repeats it, one phase
// per clock:
//   phase 0: hpre          phase 1: heva, vpre          phase 2: veva
// so the tile takes one new input every three cycles. With en low all control
// lines are off and every plane holds. The phase encoding is this design's.
module nasic_phase_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic       hpre,
  output logic       heva,
  output logic       vpre,
  output logic       veva,
  output logic [1:0] phase
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  phase <= 2'd0;
    else if (en) phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
  end

  always_comb begin
    hpre = en && (phase == 2'd0);
    heva = en && (phase == 2'd1);
    vpre = en && (phase == 2'd1);
    veva = en && (phase == 2'd2);
  end
endmodule
