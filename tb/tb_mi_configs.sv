// Workload testbench: published configurations on a 512x512, 8-bit image
// pair (the image size of the evaluation; the images here are synthetic).
//
//   FX-32-8    one core, 256-bit port (32 histogram PEs), 8 entropy lanes
//   2FX-2-4    two cores, 16-bit ports (2 PEs each), 4 lanes
//   CFX-1-1    one core with reference cache, 8-bit port, 1 lane
//   2FLT-2-2   two cores, 16-bit ports, 2 lanes, floating-point entropy
//   2CFLT-2-1  two cached cores, 16-bit ports, 1 lane, floating-point entropy
//
// For each, MI must match the floating-point value and the cycle count is
// compared with the coarse latency of the architecture: ISS/HPE + HS*HS/EPE
// with the reference cached, and 2*ISS/HPE + HS*HS/EPE without (the single
// memory port carries both images), plus at most 300 cycles of pipeline
// fill and Stage 9 division.
module tb_mi_configs;
  import mi_ref_pkg::*;
  localparam int unsigned ISS = 512 * 512, HS = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mi_cfg_run #(.NCORE(1), .MBW(256), .EPE(8), .CACHE(1'b0)) u_fx_32_8  (.clk, .rst_n);
  mi_cfg_run #(.NCORE(2), .MBW(16),  .EPE(4), .CACHE(1'b0)) u_2fx_2_4  (.clk, .rst_n);
  mi_cfg_run #(.NCORE(1), .MBW(8),   .EPE(1), .CACHE(1'b1)) u_cfx_1_1  (.clk, .rst_n);
  mi_cfg_run #(.NCORE(2), .MBW(16),  .EPE(2), .CACHE(1'b0), .FLT(1'b1)) u_2flt_2_2  (.clk, .rst_n);
  mi_cfg_run #(.NCORE(2), .MBW(16),  .EPE(1), .CACHE(1'b1), .FLT(1'b1)) u_2cflt_2_1 (.clk, .rst_n);

  int checks = 0, failures = 0;
  int unsigned rp[], fp[];
  real er, ef, ej, em;

  task automatic judge(input string name, input real g, input int cyc[],
                       input int hpe, input int epe, input bit cache);
    int lo;
    lo = (cache ? 1 : 2) * (ISS / hpe) + HS * HS / epe;
    checks++;
    if (g - em > 2.0e-3 || em - g > 2.0e-3) begin
      failures++; $display("FAIL %s: MI %f expected %f", name, g, em);
    end
    foreach (cyc[c]) begin
      checks++;
      if (cyc[c] < lo || cyc[c] > lo + 300) begin
        failures++; $display("FAIL %s core %0d: %0d cycles, expected %0d..%0d", name, c, cyc[c], lo, lo + 300);
      end
      $display("%-9s core %0d: MI %f (expected %f), %0d cycles, coarse model %0d",
               name, c, g, em, cyc[c], lo);
    end
  endtask

  initial begin
    real m1, m2, m3, m4, m5;
    int c1[], c2[], c3[], c4[], c5[];
    rp = new[ISS]; fp = new[ISS];
    for (int i = 0; i < int'(ISS); i++) begin
      int x, y;
      x = i % 512; y = i / 512;
      rp[i] = ((x / 32 + y / 48) % 6) * 40 + $urandom_range(0, 15);
    end
    for (int i = 0; i < int'(ISS); i++)
      fp[i] = (rp[(i + 5) % ISS] / 3 + 60 + $urandom_range(0, 3)) % 256;
    mi_of(rp, fp, HS, er, ef, ej, em);
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      u_fx_32_8.run(rp, fp, m1, c1);
      u_2fx_2_4.run(rp, fp, m2, c2);
      u_cfx_1_1.run(rp, fp, m3, c3);
      u_2flt_2_2.run(rp, fp, m4, c4);
      u_2cflt_2_1.run(rp, fp, m5, c5);
    join
    judge("FX-32-8", m1, c1, 32, 8, 1'b0);
    judge("2FX-2-4", m2, c2, 2, 4, 1'b0);
    judge("CFX-1-1", m3, c3, 1, 1, 1'b1);
    judge("2FLT-2-2", m4, c4, 2, 2, 1'b0);
    judge("2CFLT-2-1", m5, c5, 2, 1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
