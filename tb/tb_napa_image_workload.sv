// tb_napa_image_workload: an image-processing run on a larger array.
//
// The architecture is evaluated on camera-size images (1024 x 768 up to
// 1920 x 1600 pixels, one cell per pixel). This testbench runs the same kind
// of job, scaled to a 12 x 16 array (1024 x 768 divided by 64 in each
// direction): a generated grey-level image (a bright rectangle and a bright
// disc on a dark, slightly noisy background) is loaded, an edge-detection
// template set runs for the full 100 iterations, and the binary result
// is read out. Every output pixel is compared with the reference model, and
// the job length must equal the phase budget: loading and readout grow with
// the image width (4 phases per column each way), while the 100 iterations of
// 28 phases do not depend on the image size.
module tb_napa_image_workload;
  import napa_pkg::*;
  import napa_ref_pkg::*;
  localparam int ROWS = 12, COLS = 16, ITER = 100, IOP = 4;

  logic clk = 0, rst_n = 0;
  logic job_valid = 0, job_ready, job_done;
  tmpl_set_t job_tmpl = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix_t [ROWS-1:0] in_col = '0;
  logic [ROWS-1:0] out_col;
  logic iter_end;
  logic [$clog2(ITER+1)-1:0] iter_count;
  logic [ROWS-1:0][COLS-1:0] y;
  logic fa_s, fa_s_n, fa_co, fa_co_n;
  logic [1:0] fa_phase;
  int checks = 0, failures = 0;

  napa_top #(.ROWS(ROWS), .COLS(COLS), .ITERATIONS(ITER), .IO_PHASES(IOP)) dut (
    .clk, .rst_n, .job_valid, .job_ready, .job_load(1'b1), .job_run(1'b1), .job_read(1'b1),
    .job_tmpl, .job_done, .in_valid, .in_ready, .in_col, .out_valid, .out_ready, .out_col,
    .iter_end, .iter_count, .y,
    .fa_en(1'b0), .fa_a(1'b0), .fa_b(1'b0), .fa_c(1'b0),
    .fa_s, .fa_s_n, .fa_co, .fa_co_n, .fa_phase);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Edge detection: B = 4 at the centre and -1 at the four neighbours cancels
    // on flat regions; C = -7 keeps flat regions negative, so only object
    // pixels with a dark neighbour end positive (printed '#').
    int a[5] = '{2, 0, 0, 0, 0};
    int b[5] = '{4, -1, -1, -1, -1};
    int cc = -7;
    int u[], nx[], t0, cycles, budget, n_edge;
    bit ym[], ny[];
    u = new[ROWS*COLS]; ym = new[ROWS*COLS];
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        int dr, dc;
        bit obj;
        dr = r - 7; dc = c - 11;
        obj = (r >= 2 && r < 6 && c >= 2 && c < 7) || (dr*dr + dc*dc <= 9);
        u[r*COLS+c] = obj ? 7 - int'($urandom_range(0, 1)) : -7 + int'($urandom_range(0, 1));
        ym[r*COLS+c] = (u[r*COLS+c] < 0);
      end
    end
    for (int d = 0; d < 5; d++) begin job_tmpl.a[d] = tval_t'(a[d]); job_tmpl.b[d] = tval_t'(b[d]); end
    job_tmpl.c = cval_t'(cc);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    job_valid = 1;
    t0 = cyc;
    @(negedge clk); job_valid = 0;
    for (int k = COLS-1; k >= 0; k--) begin
      while (!in_ready) @(negedge clk);
      for (int r = 0; r < ROWS; r++) in_col[r] = pix_t'(u[r*COLS+k]);
      in_valid = 1;
      @(negedge clk); in_valid = 0;
    end
    for (int it = 0; it < ITER; it++) begin
      step(ROWS, COLS, a, b, cc, u, ym, ny, nx);
      ym = ny;
    end
    n_edge = 0;
    for (int k = 0; k < COLS; k++) begin
      while (!out_valid) @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (out_col[r] != ym[r*COLS+k]) begin
          failures++; $display("FAIL pixel (%0d,%0d) got %0d exp %0d", r, k, out_col[r], ym[r*COLS+k]);
        end
        if (!out_col[r]) n_edge++;
      end
      out_ready = 1;
      @(negedge clk); out_ready = 0;
    end
    while (!job_done) @(negedge clk);
    cycles = cyc - t0;
    budget = 2 + COLS*(IOP+1) + 1 + ITER*PHASES_PER_ITER + 2 + COLS*(IOP+1);
    checks++;
    if (cycles != budget) begin failures++; $display("FAIL job took %0d cycles, expected %0d", cycles, budget); end
    // The result is the outline: every positive pixel is an object pixel
    // next to the background, and every such pixel is positive.
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      bit is_obj, near_bg;
      is_obj = u[r*COLS+c] > 0;
      near_bg = (r > 0 && u[(r-1)*COLS+c] < 0) || (r < ROWS-1 && u[(r+1)*COLS+c] < 0) ||
                (c > 0 && u[r*COLS+c-1] < 0) || (c < COLS-1 && u[r*COLS+c+1] < 0);
      checks++;
      if ((y[r][c] == 1'b0) != (is_obj && near_bg)) begin
        failures++; $display("FAIL edge map at (%0d,%0d)", r, c);
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      string s;
      s = "";
      for (int c = 0; c < COLS; c++) s = {s, y[r][c] ? "." : "#"};
      $display("%s", s);
    end
    $display("job cycles %0d (load %0d, run %0d, read %0d), positive pixels %0d of %0d",
             cycles, COLS*(IOP+1), ITER*PHASES_PER_ITER, COLS*(IOP+1), n_edge, ROWS*COLS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
