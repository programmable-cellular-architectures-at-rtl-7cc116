// tb_napa_psg: exhaustive over a, b, u and y with random c; the partial sum
// must equal a*s(y) + b*u + c with s(0) = +1, s(1) = -1.
module tb_napa_psg;
  import napa_pkg::*;
  tmpl_t tmpl;
  logic  y;
  pix_t  u;
  ps_t   ps;
  int checks = 0, failures = 0;

  napa_psg dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++)
        for (int uu = -8; uu < 8; uu++)
          for (int yy = 0; yy < 2; yy++) begin
            int c, exp;
            c = int'($urandom_range(0, 255)) - 128;
            tmpl.a = tval_t'(a); tmpl.b = tval_t'(b); tmpl.c = cval_t'(c);
            u = pix_t'(uu); y = yy[0];
            #1;
            exp = (yy ? -a : a) + b * uu + c;
            checks++;
            if (int'(ps) != exp) begin
              failures++;
              $display("FAIL a=%0d b=%0d u=%0d y=%0d c=%0d -> %0d exp %0d", a, b, uu, yy, c, int'(ps), exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
