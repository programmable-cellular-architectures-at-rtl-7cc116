// napa_array: the ROWS x COLS grid of NAPA cells and its local interconnect.
//
// Every cell receives the same global control lines and template rails. The
// partial-sum broadcast network is purely nearest-neighbour: the partial sum a
// cell computes for direction N goes to the cell below it (which sees the
// sender as its north neighbour), E to the cell on its left, S to the cell
// above and W to the cell on its right. At the array edge the missing
// neighbour contributes a zero partial sum; the document does not discuss the
// boundary, so this fixed zero boundary is this design's choice.
// Each row has an input rail running from the IO controller on the west edge
// through all cells of the row (io_shift moves it one cell east), and an
// output rail running back (out_shift moves it one cell west, toward the IO
// controller). Row r of rail_in enters at column 0; row r of rail_out leaves
// at column 0. Rows are loaded and read in parallel.
// Parameters: ROWS and COLS default to the 5 x 5 array the document uses for
// its area comparison.
module napa_array
  import napa_pkg::*;
#(
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 5
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  cell_ctrl_t                        ctrl,
  input  tmpl_t                             tmpl,
  input  pix_t [ROWS-1:0]                   rail_in,
  output logic [ROWS-1:0]                   rail_out,
  output logic [ROWS-1:0][COLS-1:0]         y,
  output state_t [ROWS-1:0][COLS-1:0]       x
);
  ps_t  [ROWS-1:0][COLS-1:0][N_NBR-1:0] ps_out;
  pix_t [ROWS-1:0][COLS-1:0]            rail_q;
  logic [ROWS-1:0][COLS-1:0]            out_q;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      ps_t [N_NBR-1:0] ps_in;
      pix_t            rin;
      logic            orin;
      pix_t            u_unused;

      // Index 0..3 = N, E, S, W: partial sum from that neighbour.
      if (r > 0)      begin : g_n assign ps_in[0] = ps_out[r-1][c][0]; end
      else            begin : g_n0 assign ps_in[0] = '0; end
      if (c < COLS-1) begin : g_e assign ps_in[1] = ps_out[r][c+1][1]; end
      else            begin : g_e0 assign ps_in[1] = '0; end
      if (r < ROWS-1) begin : g_s assign ps_in[2] = ps_out[r+1][c][2]; end
      else            begin : g_s0 assign ps_in[2] = '0; end
      if (c > 0)      begin : g_w assign ps_in[3] = ps_out[r][c-1][3]; end
      else            begin : g_w0 assign ps_in[3] = '0; end

      if (c == 0) begin : g_rin0 assign rin = rail_in[r]; end
      else        begin : g_rin  assign rin = rail_q[r][c-1]; end
      if (c == COLS-1) begin : g_orin0 assign orin = 1'b0; end
      else             begin : g_orin  assign orin = out_q[r][c+1]; end

      napa_cell u_cell (
        .clk        (clk),
        .rst_n      (rst_n),
        .ctrl       (ctrl),
        .tmpl       (tmpl),
        .ps_in      (ps_in),
        .ps_out     (ps_out[r][c]),
        .rail_in    (rin),
        .rail_q     (rail_q[r][c]),
        .out_rail_in(orin),
        .out_q      (out_q[r][c]),
        .y          (y[r][c]),
        .u          (u_unused),
        .x          (x[r][c])
      );
    end
    assign rail_out[r] = out_q[r][0];
  end
endmodule
