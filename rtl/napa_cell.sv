// napa_cell: one NAPA digital cellular-neural-network cell.
//
// The cell holds its pixel input u and its output bit y and, under global
// control from the peripheral CMOS, evaluates
//   x(n+1) = sum_{d in self,N,E,S,W} a_d*y_d(n) + b_d*u_d + C,   y = MSB(x).
// Execution follows the document's two stages:
//  1. Partial-sum generation: for each of the five directions d in turn the
//     template rails carry (a_d, b_d, c); the partial-sum generator forms
//     a_d*y + b_d*u + c from the cell's own y and u and the result is held in
//     broadcast register d. Registers N, E, S, W are wired to the neighbour
//     that needs them (ps_out); register SELF stays local.
//  2. State accumulation: four accumulators, chained anticlockwise (N, W, S,
//     E), add the four partial sums received from the neighbours (ps_in) to
//     the cell's own partial sum. When the last accumulator evaluates, y takes
//     the MSB of the new state.
// Every stage is a dynamic register: precharge sets it to all ones, evaluate
// latches the new value on the clock edge, otherwise it holds. One control
// phase is one clock cycle.
// The cell also holds one stage of its row's input rail (rail_in -> rail_q,
// moved by io_shift) and one stage of its row's output rail (out_rail_in ->
// out_q, moved by out_shift toward the IO controller). u_load copies the input
// rail into u and sets y(0) = MSB(u), i.e. the initial state is the input;
// the initial state is this design's choice.
// Ports ps_in/ps_out are indexed by direction - 1 (N=0, E=1, S=2, W=3).
module napa_cell
  import napa_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  cell_ctrl_t              ctrl,
  input  tmpl_t                   tmpl,
  input  ps_t [N_NBR-1:0]         ps_in,
  output ps_t [N_NBR-1:0]         ps_out,
  input  pix_t                    rail_in,
  output pix_t                    rail_q,
  input  logic                    out_rail_in,
  output logic                    out_q,
  output logic                    y,
  output pix_t                    u,
  output state_t                  x
);
  ps_t [N_TMPL-1:0] ps_q;
  ps_t              ps_new;
  state_t [N_NBR-1:0] acc_q, acc_d;

  napa_psg u_psg (.tmpl(tmpl), .y(y), .u(u), .ps(ps_new));

  // Partial-sum broadcast registers.
  always_ff @(posedge clk) begin
    if (ctrl.ps_pre)      ps_q[ctrl.ps_dir] <= '1;
    else if (ctrl.ps_eva) ps_q[ctrl.ps_dir] <= ps_new;
  end

  for (genvar d = 0; d < N_NBR; d++) begin : g_out
    assign ps_out[d] = ps_q[d+1];
  end

  // Anticlockwise accumulator chain.
  for (genvar k = 0; k < N_NBR; k++) begin : g_acc
    state_t sum_in;
    if (k == 0) begin : g_first
      assign sum_in = state_t'(ps_q[DIR_SELF]);
    end else begin : g_next
      assign sum_in = acc_q[k-1];
    end
    napa_accumulator u_acc (
      .clk   (clk),
      .pre   (ctrl.acc_pre && ctrl.acc_idx == 2'(k)),
      .eva   (ctrl.acc_eva && ctrl.acc_idx == 2'(k)),
      .sum_in(sum_in),
      .ps    (ps_in[int'(acc_dir(2'(k))) - 1]),
      .sum_d (acc_d[k]),
      .sum_q (acc_q[k])
    );
  end

  assign x = acc_q[N_NBR-1];

  // Input, output bit and IO rail stages.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rail_q <= '0;
      out_q  <= 1'b0;
      u      <= '0;
      y      <= 1'b0;
    end else begin
      if (ctrl.io_shift) rail_q <= rail_in;
      if (ctrl.out_capture)    out_q <= y;
      else if (ctrl.out_shift) out_q <= out_rail_in;
      if (ctrl.u_load) begin
        u <= rail_q;
        y <= rail_q[U_W-1];
      end else if (ctrl.acc_eva && ctrl.acc_idx == 2'(N_NBR-1)) begin
        y <= acc_d[N_NBR-1][X_W-1];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.ps_pre && ctrl.ps_eva));
  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.acc_pre && ctrl.acc_eva));
  assert property (@(posedge clk) disable iff (!rst_n) ctrl.ps_dir <= DIR_W);
endmodule
