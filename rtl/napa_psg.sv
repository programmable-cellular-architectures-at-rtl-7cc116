// napa_psg: partial-sum generator of a NAPA cell.
//
// From the template rails (a, b, c) and the cell's own output bit y and input
// u it forms one partial sum a*y + b*u + c. The output bit is the MSB of the
// state, read as a sign: y = 0 stands for +1 and y = 1 for -1, so a*y is a or
// -a. The rail constant c carries the template constant C while the cell's own
// term is generated and is zero for the neighbour terms, so C enters the state
// exactly once. The document gives the function (the i-th partial sum
// a_i*y_i + b_i*u_i) but not the circuit; the sign reading of y and the way C
// is delivered are this design's choices. Purely combinational.
module napa_psg
  import napa_pkg::*;
(
  input  tmpl_t tmpl,
  input  logic  y,
  input  pix_t  u,
  output ps_t   ps
);
  ps_t ay, bu;

  always_comb begin
    ay = y ? -ps_t'(tmpl.a) : ps_t'(tmpl.a);
    bu = ps_t'(tmpl.b) * ps_t'(u);
    ps = ay + bu + ps_t'(tmpl.c);
  end
endmodule
