// tb_napa_top: end-to-end test of the NAPA processor at its default size
// (5 x 5 cells, 100 iterations per run).
// Jobs: (1) load + run + read with an edge-detection style template and host
// stalls on both streams; (2) run + read with a random template set, continuing
// from the outputs of job 1 without reloading; (3) read only; (4) load + run +
// read without stalls, whose length in cycles is checked against the phase
// budget. Outputs are compared with the reference model, iteration spacing
// must be 28 cycles, and the stand-alone NASIC full-adder tile is exercised
// alongside. Each mechanism (input stall, output stall, every partial-sum
// direction, every accumulator, template reprogramming, run without reload,
// read-only job, full-adder tile) must occur at least once.
module tb_napa_top;
  import napa_pkg::*;
  import napa_ref_pkg::*;
  localparam int ROWS = 5, COLS = 5, ITER = 100, IOP = 4;

  logic clk = 0, rst_n = 0;
  logic job_valid = 0, job_ready, job_load = 0, job_run = 0, job_read = 0, job_done;
  tmpl_set_t job_tmpl = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix_t [ROWS-1:0] in_col = '0;
  logic [ROWS-1:0] out_col;
  logic iter_end;
  logic [$clog2(ITER+1)-1:0] iter_count;
  logic [ROWS-1:0][COLS-1:0] y;
  logic fa_en = 0, fa_a = 0, fa_b = 0, fa_c = 0, fa_s, fa_s_n, fa_co, fa_co_n;
  logic [1:0] fa_phase;
  int checks = 0, failures = 0;

  napa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  int n_in_stall = 0, n_out_stall = 0, n_ps[5] = '{0, 0, 0, 0, 0}, n_acc[4] = '{0, 0, 0, 0};
  int n_iter = 0, n_reprogram = 0, n_run_no_load = 0, n_read_only = 0, n_fa = 0;
  int last_iter_cyc = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_ready && !in_valid) n_in_stall++;
      if (out_valid && !out_ready) n_out_stall++;
      if (dut.u_seq.ps_eva) n_ps[int'(dut.u_seq.ps_dir)]++;
      if (dut.u_seq.acc_eva) n_acc[dut.u_seq.acc_idx]++;
      if (iter_end) begin
        n_iter++;
        if (last_iter_cyc >= 0 && iter_count != 0) begin
          checks++;
          if (cyc - last_iter_cyc != PHASES_PER_ITER) begin
            failures++; $display("FAIL iteration took %0d cycles", cyc - last_iter_cyc);
          end
        end
        last_iter_cyc = cyc;
      end
    end
  end

  // ---------------- host model
  int u[];
  bit ym[];
  tmpl_set_t prev_tmpl;
  bit have_prev = 0;

  function automatic tmpl_set_t mk_tmpl(input int a[5], input int b[5], input int cc);
    tmpl_set_t t;
    for (int d = 0; d < 5; d++) begin t.a[d] = tval_t'(a[d]); t.b[d] = tval_t'(b[d]); end
    t.c = cval_t'(cc);
    return t;
  endfunction

  task automatic run_job(input bit ld, input bit rn, input bit rd,
                         input int a[5], input int b[5], input int cc,
                         input bit stall, output int cycles);
    int t0, nx[];
    bit ny[];
    tmpl_set_t t;
    t = mk_tmpl(a, b, cc);
    if (have_prev && t != prev_tmpl) n_reprogram++;
    prev_tmpl = t; have_prev = 1;
    if (rn && !ld) n_run_no_load++;
    if (rd && !ld && !rn) n_read_only++;
    job_tmpl = t; job_load = ld; job_run = rn; job_read = rd; job_valid = 1;
    while (!job_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk); job_valid = 0;
    if (ld) begin
      for (int i = 0; i < ROWS*COLS; i++) u[i] = int'($urandom_range(0, 15)) - 8;
      for (int k = COLS-1; k >= 0; k--) begin
        int w;
        w = stall ? $urandom_range(0, 3) : 0;
        while (!in_ready) @(negedge clk);
        repeat (w) @(negedge clk);
        for (int r = 0; r < ROWS; r++) in_col[r] = pix_t'(u[r*COLS+k]);
        in_valid = 1;
        @(negedge clk); in_valid = 0;
      end
      for (int i = 0; i < ROWS*COLS; i++) ym[i] = (u[i] < 0);
    end
    if (rn) begin
      for (int it = 0; it < ITER; it++) begin
        step(ROWS, COLS, a, b, cc, u, ym, ny, nx);
        ym = ny;
      end
    end
    if (rd) begin
      for (int k = 0; k < COLS; k++) begin
        int w;
        w = stall ? $urandom_range(0, 2) : 0;
        while (!out_valid) @(negedge clk);
        repeat (w) @(negedge clk);
        for (int r = 0; r < ROWS; r++) begin
          checks++;
          if (out_col[r] != ym[r*COLS+k]) begin
            failures++; $display("FAIL readout row %0d col %0d got %0d exp %0d", r, k, out_col[r], ym[r*COLS+k]);
          end
        end
        out_ready = 1;
        @(negedge clk); out_ready = 0;
      end
    end
    while (!job_done) @(negedge clk);
    cycles = cyc - t0;
    for (int i = 0; i < ROWS*COLS; i++) begin
      checks++;
      if (y[i/COLS][i%COLS] != ym[i]) begin failures++; $display("FAIL y cell %0d", i); end
    end
    @(negedge clk);
  endtask

  // Stand-alone full-adder tile: one addition per three-phase rotation.
  initial begin
    @(posedge rst_n);
    @(negedge clk);
    while (fa_phase != 2'd0) @(negedge clk);
    fa_en = 1;
    for (int k = 0; k < 40; k++) begin
      logic [2:0] v;
      v = 3'($urandom);
      {fa_a, fa_b, fa_c} = v;
      repeat (3) @(negedge clk);
      checks++;
      if ({fa_co, fa_s} != 2'(int'(v[0]) + int'(v[1]) + int'(v[2])) || fa_s_n == fa_s || fa_co_n == fa_co) begin
        failures++; $display("FAIL fa tile %b -> %b%b", v, fa_co, fa_s);
      end
      n_fa++;
    end
    fa_en = 0;
  end

  initial begin
    int a1[5] = '{4, 0, 0, 0, 0};
    int b1[5] = '{7, -2, -2, -2, -2};
    int c1 = -3;
    int a2[5], b2[5], c2, cycles, budget;
    u = new[ROWS*COLS]; ym = new[ROWS*COLS];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_job(1, 1, 1, a1, b1, c1, 1, cycles);
    for (int d = 0; d < 5; d++) begin
      a2[d] = int'($urandom_range(0, 15)) - 8;
      b2[d] = int'($urandom_range(0, 15)) - 8;
    end
    c2 = int'($urandom_range(0, 255)) - 128;
    run_job(0, 1, 1, a2, b2, c2, 1, cycles);
    run_job(0, 0, 1, a2, b2, c2, 1, cycles);
    run_job(1, 1, 1, a1, b1, c1, 0, cycles);
    // Accept, start, load, hand-over, run, start read, capture, read.
    budget = 2 + COLS*(IOP+1) + 1 + ITER*PHASES_PER_ITER + 2 + COLS*(IOP+1);
    checks++;
    if (cycles != budget) begin failures++; $display("FAIL job took %0d cycles, expected %0d", cycles, budget); end
    // Mechanism coverage.
    checks++;
    if (n_in_stall == 0 || n_out_stall == 0 || n_reprogram == 0 || n_run_no_load == 0 ||
        n_read_only == 0 || n_fa == 0 || n_iter != 3*ITER) begin
      failures++;
      $display("FAIL coverage: in_stall=%0d out_stall=%0d reprogram=%0d run_no_load=%0d read_only=%0d fa=%0d iters=%0d",
               n_in_stall, n_out_stall, n_reprogram, n_run_no_load, n_read_only, n_fa, n_iter);
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (n_ps[d] != 3*ITER) begin failures++; $display("FAIL partial sums dir %0d: %0d", d, n_ps[d]); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_acc[k] != 3*ITER) begin failures++; $display("FAIL accumulations %0d: %0d", k, n_acc[k]); end
    end
    $display("coverage: in_stall=%0d out_stall=%0d ps=%0d/%0d/%0d/%0d/%0d acc=%0d iters=%0d reprogram=%0d run_no_load=%0d read_only=%0d fa=%0d",
             n_in_stall, n_out_stall, n_ps[0], n_ps[1], n_ps[2], n_ps[3], n_ps[4], n_acc[0], n_iter,
             n_reprogram, n_run_no_load, n_read_only, n_fa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
