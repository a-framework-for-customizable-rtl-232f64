// Testbench of mi_calc: builds random histograms, forms their exact sums
// of c*log2(c) in floating point, feeds them (rounded to the fixed-point
// format) in varying arrival orders, and compares the entropies and MI with
// the floating-point definitions. Also checks the cycle count of the
// division stage against its bound.
module tb_mi_calc;
  import mi_ref_pkg::*;
  localparam int unsigned ET_INT = 23, ET_FRAC = 19, ETW = 42, NW = 19, HS = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic srv, sfv, sjv, done;
  logic [ETW-1:0] sr, sf, sj;
  logic [NW-1:0] n;
  logic signed [ETW-1:0] mi, hr, hf, hj;

  mi_calc #(.ET_INT(ET_INT), .ET_FRAC(ET_FRAC), .NW(NW)) dut (
    .clk, .rst_n, .sr_valid_i(srv), .sr_i(sr), .sf_valid_i(sfv), .sf_i(sf),
    .sj_valid_i(sjv), .sj_i(sj), .n_i(n), .done_o(done),
    .mi_o(mi), .h_ref_o(hr), .h_flt_o(hf), .h_joint_o(hj));

  int checks = 0, failures = 0;

  function automatic real clogc(input int unsigned h[]);
    real s = 0;
    foreach (h[i]) if (h[i] > 1) s += h[i] * log2r(h[i]);
    return s;
  endfunction

  task automatic chk(input real g, input real e, input string what);
    checks++;
    if (g - e > 1.0e-4 || e - g > 1.0e-4) begin
      failures++; $display("FAIL %s %f expected %f", what, g, e);
    end
  endtask

  initial begin
    srv = 0; sfv = 0; sjv = 0; sr = '0; sf = '0; sj = '0; n = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int unsigned rp[], fp[];
      real er, ef, ej, em;
      int unsigned jr[], rr[], ff[];
      int np, cyc;
      np = (t == 0) ? 1 : (t == 1) ? (1 << 18) : $urandom_range(2, 5000);
      rp = new[np]; fp = new[np];
      jr = new[HS * HS]; rr = new[HS]; ff = new[HS];
      foreach (jr[i]) jr[i] = 0;
      foreach (rr[i]) rr[i] = 0;
      foreach (ff[i]) ff[i] = 0;
      foreach (rp[i]) begin
        rp[i] = $urandom_range(0, HS - 1);
        fp[i] = (t % 2) ? rp[i] : $urandom_range(0, HS - 1);
        jr[rp[i] * HS + fp[i]]++; rr[rp[i]]++; ff[fp[i]]++;
      end
      mi_of(rp, fp, HS, er, ef, ej, em);
      n = NW'(np);
      @(negedge clk);
      // arrival order varies with t
      sr = ETW'(longint'(clogc(rr) * (1 << ET_FRAC)));
      sf = ETW'(longint'(clogc(ff) * (1 << ET_FRAC)));
      sj = ETW'(longint'(clogc(jr) * (1 << ET_FRAC)));
      case (t % 3)
        0: begin srv = 1; sfv = 1; sjv = 1; @(negedge clk); srv = 0; sfv = 0; sjv = 0; end
        1: begin sjv = 1; @(negedge clk); sjv = 0; repeat (5) @(negedge clk);
                 srv = 1; @(negedge clk); srv = 0; sfv = 1; @(negedge clk); sfv = 0; end
        default: begin sfv = 1; srv = 1; @(negedge clk); sfv = 0; srv = 0;
                 repeat (2) @(negedge clk); sjv = 1; @(negedge clk); sjv = 0; end
      endcase
      sr = '1; sf = '1; sj = '1;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > (ET_FRAC + 2) + 3 * (ETW + 1) + 6) begin
        failures++; $display("FAIL stage 9 took %0d cycles", cyc);
      end
      chk(fx2r(longint'(hr), ET_FRAC), er, "H(ref)");
      chk(fx2r(longint'(hf), ET_FRAC), ef, "H(flt)");
      chk(fx2r(longint'(hj), ET_FRAC), ej, "H(joint)");
      chk(fx2r(longint'(mi), ET_FRAC), em, "MI");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
