// tb_svp_reg_map: checks the register window translation against a
// reference model written from the window rules (globals to the parent's
// globals, shareds to the own context or, for the last thread, the parent's
// shareds, locals to the own context, dependents to the previous context or,
// for the first thread, the parent's shareds), over random windows.
module tb_svp_reg_map;
  import svp_pkg::*;

  logic [4:0] vreg;
  window_t    win;
  slot_t      slot;
  logic       first, last;
  ra_t        preg;
  logic       is_zero;
  int checks = 0, failures = 0;

  svp_reg_map dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int g, s, l, nb, sl, exp_reg;
      bit exp_zero;
      g = $urandom % 8; s = $urandom % 6; l = $urandom % 10; nb = 2 + $urandom % 15;
      sl = $urandom % nb;
      win.n_glob = 5'(g); win.n_shrd = 5'(s); win.n_locl = 5'(l);
      win.gbase = ra_t'(900 + $urandom % 50); win.pshbase = ra_t'(960 + $urandom % 50);
      win.ctxbase = ra_t'($urandom % 400); win.nblk = (SLOT_W+1)'(nb);
      slot = slot_t'(sl); first = $urandom % 2; last = $urandom % 2;
      vreg = 5'($urandom % 32);
      exp_zero = 0; exp_reg = 0;
      if (vreg == 31 || vreg >= g + 2*s + l) exp_zero = 1;
      else if (vreg < g) exp_reg = win.gbase + vreg;
      else if (vreg < g + s) exp_reg = last ? win.pshbase + vreg - g : win.ctxbase + sl*(s+l) + vreg - g;
      else if (vreg < g + s + l) exp_reg = win.ctxbase + sl*(s+l) + vreg - g;
      else exp_reg = first ? win.pshbase + vreg - g - s - l
                           : win.ctxbase + ((sl + nb - 1) % nb)*(s+l) + vreg - g - s - l;
      #1;
      checks++;
      if (is_zero != exp_zero || (!exp_zero && preg != ra_t'(exp_reg))) begin
        failures++;
        $display("FAIL v=%0d g=%0d s=%0d l=%0d slot=%0d first=%0d last=%0d: got %0d/%0d exp %0d/%0d",
                 vreg, g, s, l, sl, first, last, preg, is_zero, exp_reg, exp_zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
