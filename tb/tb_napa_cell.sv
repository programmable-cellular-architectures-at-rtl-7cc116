// tb_napa_cell: drives one cell through input load, random iterations of
// partial-sum generation (five directions) and anticlockwise accumulation with
// random neighbour partial sums, and output capture/shift. Every broadcast
// partial sum, the new state and the output bit are checked against values
// computed here from the CNN equation.
module tb_napa_cell;
  import napa_pkg::*;
  logic clk = 0, rst_n = 0;
  cell_ctrl_t ctrl;
  tmpl_t tmpl;
  ps_t [N_NBR-1:0] ps_in, ps_out;
  pix_t rail_in, rail_q, u;
  logic out_rail_in, out_q, y;
  state_t x;
  int checks = 0, failures = 0;

  napa_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic idle_ctrl();
    ctrl = '0;
  endtask

  initial begin
    int a[5], b[5], cc, uu, yy, self_ps, xs;
    int nbr[4];
    idle_ctrl();
    tmpl = '0; ps_in = '0; rail_in = '0; out_rail_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Load u through the rail.
    uu = -5;
    rail_in = pix_t'(uu); ctrl.io_shift = 1; @(negedge clk); idle_ctrl();
    check(rail_q == pix_t'(uu), "rail stage");
    ctrl.u_load = 1; @(negedge clk); idle_ctrl();
    check(u == pix_t'(uu) && y == 1'b1, "u_load sets u and y(0)=MSB(u)");
    yy = 1;
    for (int it = 0; it < 40; it++) begin
      for (int d = 0; d < 5; d++) begin
        a[d] = int'($urandom_range(0, 15)) - 8;
        b[d] = int'($urandom_range(0, 15)) - 8;
      end
      cc = int'($urandom_range(0, 255)) - 128;
      for (int k = 0; k < 4; k++) nbr[k] = int'($urandom_range(0, 400)) - 200;
      for (int k = 0; k < 4; k++) ps_in[k] = ps_t'(nbr[k]);
      for (int d = 0; d < 5; d++) begin
        int exp;
        tmpl.a = tval_t'(a[d]); tmpl.b = tval_t'(b[d]); tmpl.c = (d == 0) ? cval_t'(cc) : '0;
        exp = (yy ? -a[d] : a[d]) + b[d] * uu + ((d == 0) ? cc : 0);
        if (d == 0) self_ps = exp;
        ctrl.ps_dir = dir_e'(d);
        ctrl.ps_pre = 1; @(negedge clk); ctrl.ps_pre = 0;
        if (d > 0) check(ps_out[d-1] == '1, "partial-sum precharge");
        ctrl.ps_eva = 1; @(negedge clk); ctrl.ps_eva = 0;
        tmpl = tmpl_t'($urandom);           // rails change after evaluation
        if (d > 0) check(int'(ps_out[d-1]) == exp,
                         $sformatf("broadcast d=%0d got %0d exp %0d", d, int'(ps_out[d-1]), exp));
      end
      for (int k = 0; k < 4; k++) begin
        ctrl.acc_idx = 2'(k);
        ctrl.acc_pre = 1; @(negedge clk); ctrl.acc_pre = 0;
        ctrl.acc_eva = 1; @(negedge clk); ctrl.acc_eva = 0;
      end
      xs = self_ps + nbr[0] + nbr[1] + nbr[2] + nbr[3];
      yy = (xs < 0);
      check(int'(x) == xs, $sformatf("state got %0d exp %0d", int'(x), xs));
      check(y == yy[0], "output bit is MSB of state");
    end
    ctrl.out_capture = 1; @(negedge clk); ctrl = '0;
    check(out_q == y, "output capture");
    out_rail_in = ~y; ctrl.out_shift = 1; @(negedge clk); ctrl = '0;
    check(out_q == ~y, "output rail shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
