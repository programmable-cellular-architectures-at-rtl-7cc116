// napa_top: a NAPA programmable cellular processor.
//
// A ROWS x COLS array of identical digital CNN cells, one per pixel, is
// controlled entirely through a few global lines from peripheral CMOS:
//  - napa_sequencer steps the dynamic control phases (template assertion,
//    partial-sum generation and broadcast, anticlockwise state accumulation,
//    ITERATIONS iterations) and holds the programmed template set of a job;
//  - napa_template_rails carries the current template (a, b, C) to every cell;
//  - napa_io_ctrl loads pixels serially over the row input rails and reads the
//    output bits back over the row output rails;
//  - napa_array holds the cells and their nearest-neighbour interconnect.
// Beside the processor, and independent of it, sits a stand-alone NASIC
// full-adder tile with its three-phase dynamic control (nasic_phase_gen,
// nasic_fa_tile), the basic building block of the fabric, with its own ports.
//
// Host protocol: submit a job (job_valid while job_ready) with a template set
// and the load/run/read flags. During load, offer COLS columns on
// in_col/in_valid, last column first. During read, take COLS columns from
// out_col/out_valid/out_ready, column 0 first; bit r of a column is row r's
// output y (1 = negative state). job_done pulses when the job ends.
// A full job takes about COLS*(IO_PHASES+1) cycles to load, 28*ITERATIONS
// cycles to run and COLS*(IO_PHASES+1) cycles to read, without stalls.
// Defaults: 5 x 5 array (the size used in the document's area comparison) and
// 100 iterations (the document's convergence count).
module napa_top
  import napa_pkg::*;
#(
  parameter int unsigned ROWS       = 5,
  parameter int unsigned COLS       = 5,
  parameter int unsigned ITERATIONS = 100,
  parameter int unsigned IO_PHASES  = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // job interface
  input  logic                         job_valid,
  output logic                         job_ready,
  input  logic                         job_load,
  input  logic                         job_run,
  input  logic                         job_read,
  input  tmpl_set_t                    job_tmpl,
  output logic                         job_done,
  // pixel load stream
  input  logic                         in_valid,
  output logic                         in_ready,
  input  pix_t [ROWS-1:0]              in_col,
  // output readout stream
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [ROWS-1:0]              out_col,
  // observation
  output logic                         iter_end,
  output logic [$clog2(ITERATIONS+1)-1:0] iter_count,
  output logic [ROWS-1:0][COLS-1:0]    y,
  // stand-alone NASIC full-adder tile
  input  logic                         fa_en,
  input  logic                         fa_a,
  input  logic                         fa_b,
  input  logic                         fa_c,
  output logic                         fa_s,
  output logic                         fa_s_n,
  output logic                         fa_co,
  output logic                         fa_co_n,
  output logic [1:0]                   fa_phase
);
  cell_ctrl_t ctrl;
  logic       io_start_load, io_start_read, io_done, io_busy_unused;
  logic       t_pre, t_eva;
  tmpl_t      t_value;
  tmpl_t [0:0] rails;
  pix_t [ROWS-1:0]  rail_in;
  logic [ROWS-1:0]  rail_out;
  state_t [ROWS-1:0][COLS-1:0] x_unused;

  napa_sequencer #(.ITERATIONS(ITERATIONS)) u_seq (
    .clk, .rst_n,
    .job_valid, .job_ready, .job_load, .job_run, .job_read, .job_tmpl, .job_done,
    .io_start_load, .io_start_read, .io_done,
    .t_pre, .t_eva, .t_value,
    .ps_pre (ctrl.ps_pre),  .ps_eva (ctrl.ps_eva), .ps_dir (ctrl.ps_dir),
    .acc_pre(ctrl.acc_pre), .acc_eva(ctrl.acc_eva), .acc_idx(ctrl.acc_idx),
    .iter_end, .iter_count
  );

  napa_io_ctrl #(.ROWS(ROWS), .COLS(COLS), .IO_PHASES(IO_PHASES)) u_io (
    .clk, .rst_n,
    .start_load(io_start_load), .start_read(io_start_read),
    .busy(io_busy_unused), .done(io_done),
    .in_valid, .in_ready, .in_col,
    .out_valid, .out_ready, .out_col,
    .rail_in, .rail_out,
    .io_shift(ctrl.io_shift), .u_load(ctrl.u_load),
    .out_capture(ctrl.out_capture), .out_shift(ctrl.out_shift)
  );

  napa_template_rails #(.SETS(1)) u_rails (
    .clk, .pre(t_pre), .eva(t_eva), .value(t_value), .rails
  );

  napa_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .ctrl, .tmpl(rails[0]),
    .rail_in, .rail_out, .y, .x(x_unused)
  );

  // Stand-alone NASIC full-adder tile.
  logic hpre, heva, vpre, veva;

  nasic_phase_gen u_fa_ctl (
    .clk, .rst_n, .en(fa_en), .hpre, .heva, .vpre, .veva, .phase(fa_phase)
  );

  nasic_fa_tile u_fa_tile (
    .clk, .hpre, .heva, .vpre, .veva,
    .a0(fa_a), .a0_n(~fa_a), .b0(fa_b), .b0_n(~fa_b), .c0(fa_c), .c0_n(~fa_c),
    .s0(fa_s), .s0_n(fa_s_n), .c1(fa_co), .c1_n(fa_co_n)
  );
endmodule
