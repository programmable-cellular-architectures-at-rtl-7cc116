// tb_napa_array: a 3 x 4 array driven directly through its control lines.
// Loads a random image over the row rails, runs iterations with random
// template sets and compares every cell's state and output with the reference
// model after each iteration (this covers the neighbour wiring in all four
// directions and the zero boundary), then reads the outputs over the row
// output rails.
module tb_napa_array;
  import napa_pkg::*;
  import napa_ref_pkg::*;
  localparam int ROWS = 3, COLS = 4;

  logic clk = 0, rst_n = 0;
  cell_ctrl_t ctrl = '0;
  tmpl_t tmpl = '0;
  pix_t [ROWS-1:0] rail_in = '0;
  logic [ROWS-1:0] rail_out;
  logic [ROWS-1:0][COLS-1:0] y;
  state_t [ROWS-1:0][COLS-1:0] x;
  int checks = 0, failures = 0;

  napa_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input cell_ctrl_t c);
    ctrl = c; @(negedge clk); ctrl = '0;
  endtask

  initial begin
    int u[], a[5], b[5], cc, nx[];
    bit ym[], ny[];
    cell_ctrl_t c;
    u = new[ROWS*COLS]; ym = new[ROWS*COLS];
    for (int i = 0; i < ROWS*COLS; i++) u[i] = int'($urandom_range(0, 15)) - 8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Serial load, last column first.
    for (int k = COLS-1; k >= 0; k--) begin
      for (int r = 0; r < ROWS; r++) rail_in[r] = pix_t'(u[r*COLS+k]);
      c = '0; c.io_shift = 1; pulse(c);
    end
    c = '0; c.u_load = 1; pulse(c);
    for (int i = 0; i < ROWS*COLS; i++) begin
      ym[i] = (u[i] < 0);
      checks++;
      if (y[i/COLS][i%COLS] != ym[i]) begin failures++; $display("FAIL y(0) cell %0d", i); end
    end
    for (int it = 0; it < 30; it++) begin
      for (int d = 0; d < 5; d++) begin
        a[d] = int'($urandom_range(0, 15)) - 8;
        b[d] = int'($urandom_range(0, 15)) - 8;
      end
      cc = int'($urandom_range(0, 255)) - 128;
      for (int d = 0; d < 5; d++) begin
        tmpl.a = tval_t'(a[d]); tmpl.b = tval_t'(b[d]); tmpl.c = (d == 0) ? cval_t'(cc) : '0;
        c = '0; c.ps_dir = dir_e'(d); c.ps_pre = 1; pulse(c);
        c = '0; c.ps_dir = dir_e'(d); c.ps_eva = 1; pulse(c);
      end
      for (int k = 0; k < 4; k++) begin
        c = '0; c.acc_idx = 2'(k); c.acc_pre = 1; pulse(c);
        c = '0; c.acc_idx = 2'(k); c.acc_eva = 1; pulse(c);
      end
      step(ROWS, COLS, a, b, cc, u, ym, ny, nx);
      ym = ny;
      for (int i = 0; i < ROWS*COLS; i++) begin
        checks++;
        if (int'(x[i/COLS][i%COLS]) != nx[i] || y[i/COLS][i%COLS] != ny[i]) begin
          failures++;
          $display("FAIL it %0d cell (%0d,%0d): x=%0d exp %0d", it, i/COLS, i%COLS,
                   int'(x[i/COLS][i%COLS]), nx[i]);
        end
      end
    end
    // Readout over the output rails, column 0 first.
    c = '0; c.out_capture = 1; pulse(c);
    for (int k = 0; k < COLS; k++) begin
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (rail_out[r] != ym[r*COLS+k]) begin failures++; $display("FAIL readout r%0d c%0d", r, k); end
      end
      c = '0; c.out_shift = 1; pulse(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
