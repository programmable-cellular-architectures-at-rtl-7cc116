// tb_napa_io_ctrl: loads a 3 x 4 image through the IO controller into a
// behavioural copy of the row rails, with random host stalls, then reads an
// output pattern back. Checks rail contents, u_load, column order, that data
// move exactly once every IO_PHASES cycles, and the transfer cycle counts.
module tb_napa_io_ctrl;
  import napa_pkg::*;
  localparam int ROWS = 3, COLS = 4, IOP = 4;

  logic clk = 0, rst_n = 0;
  logic start_load = 0, start_read = 0, busy, done;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix_t [ROWS-1:0] in_col = '0, rail_in;
  logic [ROWS-1:0] out_col, rail_out;
  logic io_shift, u_load, out_capture, out_shift;
  int checks = 0, failures = 0;

  // Behavioural row rails.
  pix_t [ROWS-1:0][COLS-1:0] rail;
  logic [ROWS-1:0][COLS-1:0] orail, ybits;
  int n_shift = 0, n_oshift = 0, n_uload = 0, stalls = 0;

  napa_io_ctrl #(.ROWS(ROWS), .COLS(COLS), .IO_PHASES(IOP)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (rst_n) begin
    if (io_shift) begin
      for (int r = 0; r < ROWS; r++) begin
        for (int c = COLS-1; c > 0; c--) rail[r][c] <= rail[r][c-1];
        rail[r][0] <= rail_in[r];
      end
      n_shift++;
    end
    if (out_capture) orail <= ybits;
    else if (out_shift) begin
      for (int r = 0; r < ROWS; r++) orail[r] <= {1'b0, orail[r][COLS-1:1]};
      n_oshift++;
    end
    if (u_load) n_uload++;
  end
  always_comb for (int r = 0; r < ROWS; r++) rail_out[r] = orail[r][0];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t [COLS-1:0][ROWS-1:0] img;
  int t0, t1;

  initial begin
    for (int c = 0; c < COLS; c++) for (int r = 0; r < ROWS; r++) img[c][r] = pix_t'($urandom);
    ybits = ROWS*COLS'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- load without stalls, timed
    start_load = 1; t0 = int'($time / 10); @(negedge clk); start_load = 0;
    for (int k = 0; k < COLS; k++) begin
      in_col = img[COLS-1-k]; in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk); in_valid = 0;
    end
    while (!done) @(negedge clk);
    t1 = int'($time / 10);
    @(negedge clk);
    checks++;
    if (t1 - t0 != 1 + COLS * (IOP + 1)) begin
      failures++; $display("FAIL load took %0d cycles", t1 - t0);
    end
    checks++;
    if (n_shift != COLS || n_uload != 1) begin
      failures++; $display("FAIL shifts %0d uload %0d", n_shift, n_uload);
    end
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      checks++;
      if (rail[r][c] != img[c][r]) begin
        failures++; $display("FAIL rail[%0d][%0d]=%0d exp %0d", r, c, rail[r][c], img[c][r]);
      end
    end
    // ---- load again with host stalls
    for (int c = 0; c < COLS; c++) for (int r = 0; r < ROWS; r++) img[c][r] = pix_t'($urandom);
    start_load = 1; @(negedge clk); start_load = 0;
    for (int k = 0; k < COLS; k++) begin
      int w;
      w = $urandom_range(0, 3);
      repeat (w) begin @(negedge clk); if (in_ready) stalls++; end
      in_col = img[COLS-1-k]; in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk); in_valid = 0;
    end
    while (busy) @(negedge clk);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      checks++;
      if (rail[r][c] != img[c][r]) begin failures++; $display("FAIL reload rail[%0d][%0d]", r, c); end
    end
    // ---- read with consumer stalls
    start_read = 1; t0 = int'($time / 10); @(negedge clk); start_read = 0;
    for (int k = 0; k < COLS; k++) begin
      int w;
      w = $urandom_range(0, 2);
      while (!out_valid) @(negedge clk);
      repeat (w) begin
        @(negedge clk); stalls++;
        checks++;
        if (!out_valid) begin failures++; $display("FAIL out_valid dropped"); end
      end
      out_ready = 1;
      checks++;
      for (int r = 0; r < ROWS; r++) if (out_col[r] != ybits[r][k]) begin
        failures++; $display("FAIL out col %0d row %0d", k, r);
        break;
      end
      @(negedge clk); out_ready = 0;
    end
    while (busy) @(negedge clk);
    checks++;
    if (n_oshift != COLS) begin failures++; $display("FAIL out shifts %0d", n_oshift); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
