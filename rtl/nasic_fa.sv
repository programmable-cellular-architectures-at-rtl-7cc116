// nasic_fa: 1-bit full adder in the two-level NAND-NAND form of a NASIC tile.
//
// Each input arrives in true and complemented form (a0/a0_n, b0/b0_n,
// c0/c0_n), as on the input nanowires of the NASIC full-adder tile. The first
// (horizontal) NAND plane forms the complement of all eight minterms of the
// three inputs; the second (vertical) NAND plane ORs them into the sum s0, the
// carry c1 and their complements. The tile's structure (two cascaded NAND
// planes, dual-rail inputs and the four outputs c1, c1_n, s0, s0_n) follows the
// document; the choice of one product line per minterm is this design's.
// Purely combinational; the dynamic precharge/evaluate timing of a real tile
// is modelled separately in nasic_fa_tile.
module nasic_fa (
  input  logic a0, a0_n,
  input  logic b0, b0_n,
  input  logic c0, c0_n,
  output logic s0, s0_n,
  output logic c1, c1_n
);
  // m_n[i] is low when the inputs equal the 3-bit pattern i = {a,b,c}.
  logic [7:0] m_n;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      m_n[i] = ~((i[2] ? a0 : a0_n) & (i[1] ? b0 : b0_n) & (i[0] ? c0 : c0_n));
    end
    // Vertical plane: NAND of selected minterm lines.
    s0   = ~(m_n[1] & m_n[2] & m_n[4] & m_n[7]);   // odd parity
    s0_n = ~(m_n[0] & m_n[3] & m_n[5] & m_n[6]);
    c1   = ~(m_n[3] & m_n[5] & m_n[6] & m_n[7]);   // two or more ones
    c1_n = ~(m_n[0] & m_n[1] & m_n[2] & m_n[4]);
  end
endmodule
