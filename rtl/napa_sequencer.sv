// napa_sequencer: peripheral CMOS control of the NAPA array.
//
// It runs the document's data-flow chart: load inputs; then, per iteration,
// for each of the five partial sums assert the template values on the rails
// and generate/broadcast the partial sum; once all five exist, accumulate the
// state and generate the output; repeat for ITERATIONS iterations (100 in the
// document, enough for the network to converge); finally read the output out.
// None of these steps is a decision taken in the array: the sequencer simply
// drives the dynamic control lines in order.
//
// A host submits a job (job_valid/job_ready) holding a complete template set
// and three flags: load, run, read. The enabled steps run in that order, so a
// job can do the whole chart, or several jobs can run different template sets
// one after another on the same loaded image (each run continues from the
// outputs left by the previous one). The job interface is this design's.
//
// Timing of one iteration, one dynamic phase per clock (28 phases):
//   for d = SELF, N, E, S, W: template precharge, template evaluate,
//                             partial-sum precharge, partial-sum evaluate
//   for k = 0..3:             accumulator k precharge, accumulator k evaluate
// The template constant C is put on the rails with the SELF template only.
module napa_sequencer
  import napa_pkg::*;
#(
  parameter int unsigned ITERATIONS = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  // job interface
  input  logic        job_valid,
  output logic        job_ready,
  input  logic        job_load,
  input  logic        job_run,
  input  logic        job_read,
  input  tmpl_set_t   job_tmpl,
  output logic        job_done,      // one-cycle pulse when a job ends
  // IO controller
  output logic        io_start_load,
  output logic        io_start_read,
  input  logic        io_done,
  // template rails
  output logic        t_pre,
  output logic        t_eva,
  output tmpl_t       t_value,
  // array dynamic control (partial sums and accumulators)
  output logic        ps_pre,
  output logic        ps_eva,
  output dir_e        ps_dir,
  output logic        acc_pre,
  output logic        acc_eva,
  output logic [1:0]  acc_idx,
  // status
  output logic        iter_end,      // pulse on the last phase of an iteration
  output logic [$clog2(ITERATIONS+1)-1:0] iter_count
);
  localparam int unsigned IW  = $clog2(ITERATIONS + 1);
  localparam int unsigned PHW = $clog2(PHASES_PER_ITER);
  localparam int unsigned PS_END = N_TMPL * PS_PHASES;   // first accumulate phase

  typedef enum logic [2:0] {
    S_IDLE, S_LD_GO, S_LD_WAIT, S_RUN, S_RD_GO, S_RD_WAIT, S_DONE
  } state_e;

  state_e         state;
  logic           f_run, f_read;
  tmpl_set_t      tset;
  logic [PHW-1:0] phase;
  logic [IW-1:0]  iter;

  assign iter_count = iter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      f_run  <= 1'b0;
      f_read <= 1'b0;
      tset   <= '0;
      phase  <= '0;
      iter   <= '0;
    end else begin
      case (state)
        S_IDLE: if (job_valid) begin
          tset   <= job_tmpl;
          f_run  <= job_run;
          f_read <= job_read;
          phase  <= '0;
          iter   <= '0;
          if (job_load)      state <= S_LD_GO;
          else if (job_run)  state <= S_RUN;
          else if (job_read) state <= S_RD_GO;
          else               state <= S_DONE;
        end
        S_LD_GO:   state <= S_LD_WAIT;
        S_LD_WAIT: if (io_done) begin
          if (f_run)       state <= S_RUN;
          else if (f_read) state <= S_RD_GO;
          else             state <= S_DONE;
        end
        S_RUN: begin
          if (phase == PHW'(PHASES_PER_ITER - 1)) begin
            phase <= '0;
            iter  <= iter + 1'b1;
            if (iter == IW'(ITERATIONS - 1)) state <= f_read ? S_RD_GO : S_DONE;
          end else begin
            phase <= phase + 1'b1;
          end
        end
        S_RD_GO:   state <= S_RD_WAIT;
        S_RD_WAIT: if (io_done) state <= S_DONE;
        S_DONE:    state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  // Phase decoding.
  always_comb begin
    int unsigned    q;
    int unsigned    d;
    t_pre   = 1'b0;
    t_eva   = 1'b0;
    ps_pre  = 1'b0;
    ps_eva  = 1'b0;
    ps_dir  = DIR_SELF;
    acc_pre = 1'b0;
    acc_eva = 1'b0;
    acc_idx = 2'd0;
    q       = 0;
    d       = 0;
    t_value = '0;
    if (state == S_RUN) begin
      if (phase < PHW'(PS_END)) begin
        d      = int'(phase) / PS_PHASES;
        ps_dir = dir_e'(d);
        case (int'(phase) % PS_PHASES)
          0:       t_pre  = 1'b1;
          1:       t_eva  = 1'b1;
          2:       ps_pre = 1'b1;
          default: ps_eva = 1'b1;
        endcase
        t_value.a = tset.a[d];
        t_value.b = tset.b[d];
        t_value.c = (d == 0) ? tset.c : '0;
      end else begin
        q       = int'(phase) - PS_END;
        acc_idx = 2'(q / ACC_PHASES);
        acc_pre = (q % ACC_PHASES) == 0;
        acc_eva = (q % ACC_PHASES) == 1;
      end
    end
  end

  always_comb begin
    job_ready     = (state == S_IDLE);
    job_done      = (state == S_DONE);
    io_start_load = (state == S_LD_GO);
    io_start_read = (state == S_RD_GO);
    iter_end      = (state == S_RUN) && (phase == PHW'(PHASES_PER_ITER - 1));
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({t_pre, t_eva, ps_pre, ps_eva, acc_pre, acc_eva}));
endmodule
