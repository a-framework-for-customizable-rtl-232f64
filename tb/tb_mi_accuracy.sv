// Accuracy workload: 100 random image pairs evaluated by the default core
// (fixed-point entropy) and by the same core built with floating-point
// entropy, both against double-precision mutual information computed from
// the pixels. Reports the mean squared error of fixed point against
// floating point, and of each against double precision.
//
// The images are 64x64 (4096 pixels) so that 100 evaluations stay short;
// each still drains the full 256x256-bin joint histogram. The pairs range
// from independent to fully dependent: each floating pixel copies a
// function of the reference pixel with a random probability and is random
// otherwise, and the intensity spread is random too.
module tb_mi_accuracy;
  import mi_ref_pkg::*;
  localparam int unsigned NT = 100, NPIX = 64 * 64, HS = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mi_cfg_run #(.NCORE(1), .MBW(32), .EPE(4), .CACHE(1'b0), .FLT(1'b0)) u_fx  (.clk, .rst_n);
  mi_cfg_run #(.NCORE(1), .MBW(32), .EPE(4), .CACHE(1'b0), .FLT(1'b1)) u_flt (.clk, .rst_n);

  int checks = 0, failures = 0;

  task automatic chk(input real g, input real e, input real tol, input string what, input int t);
    checks++;
    if (g - e > tol || e - g > tol) begin
      failures++; $display("FAIL test %0d %s: %f expected %f", t, what, g, e);
    end
  endtask

  initial begin
    real se_fx_flt, se_fx_d, se_flt_d, mi_lo, mi_hi;
    se_fx_flt = 0.0; se_fx_d = 0.0; se_flt_d = 0.0; mi_lo = 100.0; mi_hi = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < int'(NT); t++) begin
      int unsigned rp[], fp[];
      int cf[], cl[];
      real er, ef, ej, em, mfx, mfl;
      int unsigned pdep, spread, shift;
      rp = new[NPIX]; fp = new[NPIX];
      pdep   = $urandom_range(0, 100);
      spread = $urandom_range(1, 255);
      shift  = $urandom_range(0, 255);
      foreach (rp[i]) begin
        rp[i] = $urandom_range(0, spread);
        fp[i] = ($urandom_range(1, 100) <= pdep) ? (rp[i] * 3 / 2 + shift) % HS
                                                 : $urandom_range(0, HS - 1);
      end
      mi_of(rp, fp, HS, er, ef, ej, em);
      fork
        u_fx.run(rp, fp, mfx, cf);
        u_flt.run(rp, fp, mfl, cl);
      join
      chk(mfx, em, 2.0e-5, "FX MI", t);
      chk(mfl, em, 2.0e-5, "FLT MI", t);
      se_fx_flt += (mfx - mfl) ** 2;
      se_fx_d   += (mfx - em) ** 2;
      se_flt_d  += (mfl - em) ** 2;
      if (em < mi_lo) mi_lo = em;
      if (em > mi_hi) mi_hi = em;
    end
    $display("MI range over %0d tests: %f .. %f bits", NT, mi_lo, mi_hi);
    $display("MSE fixed vs float %e, fixed vs double %e, float vs double %e",
             se_fx_flt / NT, se_fx_d / NT, se_flt_d / NT);
    checks++;
    if (se_fx_flt / NT > 1.0e-9) begin failures++; $display("FAIL fixed-vs-float MSE too large"); end
    checks++;
    if (mi_hi - mi_lo < 2.0) begin failures++; $display("FAIL inputs do not span a wide MI range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
