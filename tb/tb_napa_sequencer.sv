// tb_napa_sequencer: runs jobs through the sequencer with a stub IO
// controller and checks the exact 28-phase order of every iteration, the
// template value asserted with each partial sum (C only with SELF), the
// iteration count, the IO start pulses and the run length in cycles.
module tb_napa_sequencer;
  import napa_pkg::*;
  localparam int ITER = 3;

  logic clk = 0, rst_n = 0;
  logic job_valid = 0, job_ready, job_load = 0, job_run = 0, job_read = 0, job_done;
  tmpl_set_t job_tmpl = '0;
  logic io_start_load, io_start_read, io_done = 0;
  logic t_pre, t_eva, ps_pre, ps_eva, acc_pre, acc_eva, iter_end;
  tmpl_t t_value;
  dir_e ps_dir;
  logic [1:0] acc_idx;
  logic [$clog2(ITER+1)-1:0] iter_count;
  int checks = 0, failures = 0;

  napa_sequencer #(.ITERATIONS(ITER)) dut (.*);

  always #5 clk = ~clk;

  // Stub IO controller: done 7 cycles after a start.
  int io_cnt = -1, n_load = 0, n_read = 0;
  always_ff @(posedge clk) begin
    io_done <= 1'b0;
    if (io_start_load || io_start_read) begin
      io_cnt <= 7;
      if (io_start_load) n_load++;
      if (io_start_read) n_read++;
    end else if (io_cnt > 0) io_cnt <= io_cnt - 1;
    else if (io_cnt == 0) begin io_done <= 1'b1; io_cnt <= -1; end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] expected(input int p, input tmpl_set_t ts, output tmpl_t tv);
    // {t_pre,t_eva,ps_pre,ps_eva,acc_pre,acc_eva, ps_dir(3), acc_idx(2), 1'b0}
    logic [11:0] e = '0;
    tv = '0;
    if (p < 20) begin
      int d = p / 4;
      e[11 - (p % 4)] = 1'b1;
      e[5:3] = 3'(d);
      tv.a = ts.a[d]; tv.b = ts.b[d]; tv.c = (d == 0) ? ts.c : '0;
    end else begin
      int q = p - 20;
      e[(q % 2) ? 6 : 7] = 1'b1;
      e[2:1] = 2'(q / 2);
    end
    return e;
  endfunction

  task automatic run_job(input logic ld, input logic rn, input logic rd);
    tmpl_set_t ts;
    int run_cycles = 0, phase = 0, iters = 0, l0, r0;
    ts = tmpl_set_t'({$urandom, $urandom, $urandom});
    l0 = n_load; r0 = n_read;
    job_tmpl = ts; job_load = ld; job_run = rn; job_read = rd; job_valid = 1;
    while (!job_ready) @(negedge clk);
    @(negedge clk); job_valid = 0; job_tmpl = '0;
    while (!job_done) begin
      logic [11:0] got, exp;
      tmpl_t tv;
      got = {t_pre, t_eva, ps_pre, ps_eva, acc_pre, acc_eva, ps_dir, acc_idx, 1'b0};
      if (got[11:6] != 0) begin
        exp = expected(phase, ts, tv);
        if (phase >= 20) got[5:3] = 3'b0;
        if (phase < 20) got[2:1] = 2'b0;
        checks++;
        if (got != exp || ((t_pre || t_eva || ps_pre || ps_eva) && t_value != tv && t_eva)) begin
          failures++;
          $display("FAIL iter %0d phase %0d got %b exp %b", iters, phase, got, exp);
        end
        if (iter_end) begin
          checks++;
          if (phase != PHASES_PER_ITER - 1) begin failures++; $display("FAIL iter_end at %0d", phase); end
          iters++;
        end
        phase = (phase + 1) % PHASES_PER_ITER;
        run_cycles++;
      end
      @(negedge clk);
    end
    checks++;
    if (run_cycles != (rn ? ITER * PHASES_PER_ITER : 0) || iters != (rn ? ITER : 0)) begin
      failures++; $display("FAIL run took %0d cycles, %0d iterations", run_cycles, iters);
    end
    checks++;
    if (n_load - l0 != int'(ld) || n_read - r0 != int'(rd)) begin
      failures++; $display("FAIL io starts load %0d read %0d", n_load - l0, n_read - r0);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_job(1, 1, 1);
    run_job(0, 1, 0);
    run_job(0, 1, 1);
    run_job(1, 0, 0);
    run_job(0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
