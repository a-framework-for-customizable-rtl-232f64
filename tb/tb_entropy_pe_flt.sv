// Testbench of entropy_pe_flt: streams counts (with gaps) and checks each
// IEEE single term against c*log2(c) computed in double precision, the
// exact results for 0, 1 and powers of two, the last flag, and the latency
// ET_FRAC + 2.
module tb_entropy_pe_flt;
  import mi_ref_pkg::*;
  localparam int unsigned CW = 19, ET_FRAC = 19;
  localparam int unsigned LAT = ET_FRAC + 2, NV = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_v, in_l, out_v, out_l;
  logic [CW-1:0] c;
  logic [31:0] t;

  entropy_pe_flt #(.CW(CW), .ET_FRAC(ET_FRAC)) dut (
    .clk, .rst_n, .in_valid_i(in_v), .cnt_i(c), .in_last_i(in_l),
    .out_valid_o(out_v), .term_o(t), .out_last_o(out_l));

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int unsigned vals [NV];
  int sent [NV];
  always @(posedge clk) cyc++;

  function automatic bit is_pow2(input int unsigned v);
    return v != 0 && (v & (v - 1)) == 0;
  endfunction

  always @(posedge clk) if (rst_n && out_v) begin
    real e, g, tol;
    int unsigned v;
    v = vals[nout];
    e = (v == 0) ? 0.0 : v * log2r(real'(v));
    g = f2r(t);
    // log2 carries about 2^-ET_FRAC absolute error, the product one rounding
    tol = v * 4.0 / (1 << ET_FRAC) + e * (2.0 ** -23);
    checks += 3;
    if (is_pow2(v) || v == 0) begin
      checks++;
      if (g != e) begin failures++; $display("FAIL %0d*log2 = %f not exact (%f)", v, g, e); end
    end
    if (g - e > tol || e - g > tol) begin
      failures++; $display("FAIL %0d*log2 = %f expected %f", v, g, e);
    end
    if (cyc - sent[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - sent[nout]); end
    if (out_l != (nout == NV - 1)) begin failures++; $display("FAIL last flag at %0d", nout); end
    nout++;
  end

  initial begin
    foreach (vals[i]) vals[i] = (i < 10) ? i : (i < 29) ? (1 << (i - 10)) : $urandom_range(0, (1 << CW) - 1);
    vals[NV-1] = (1 << CW) - 1;
    in_v = 0; in_l = 0; c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_v = 0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_v = 1; c = CW'(vals[i]); in_l = (i == NV - 1);
      sent[i] = cyc + 1;
    end
    @(negedge clk) begin in_v = 0; in_l = 0; end
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (nout != NV) begin failures++; $display("FAIL %0d results", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
