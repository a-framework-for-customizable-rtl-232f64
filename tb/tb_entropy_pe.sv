// Testbench of entropy_pe: streams counts (with gaps) and checks each
// term against c*log2(c) computed in floating point, the last flag, and
// the latency ET_FRAC + 2.
module tb_entropy_pe;
  localparam int unsigned CW = 19, ET_INT = 23, ET_FRAC = 19, ETW = ET_INT + ET_FRAC;
  localparam int unsigned LAT = ET_FRAC + 2, NV = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_v, in_l, out_v, out_l;
  logic [CW-1:0] c;
  logic [ETW-1:0] t;

  entropy_pe #(.CW(CW), .ET_INT(ET_INT), .ET_FRAC(ET_FRAC)) dut (
    .clk, .rst_n, .in_valid_i(in_v), .cnt_i(c), .in_last_i(in_l),
    .out_valid_o(out_v), .term_o(t), .out_last_o(out_l));

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int unsigned vals [NV];
  int sent [NV];
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_v) begin
    real e, g;
    e = (vals[nout] == 0) ? 0.0 : vals[nout] * $ln(real'(vals[nout])) / $ln(2.0);
    g = real'(t) / real'(1 << ET_FRAC);
    checks += 3;
    if (g - e > 1.0e-4 * (1.0 + e) || e - g > 1.0e-4 * (1.0 + e) + vals[nout] * 4.0 / (1 << ET_FRAC)) begin
      failures++; $display("FAIL %0d*log2 = %f expected %f", vals[nout], g, e);
    end
    if (cyc - sent[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - sent[nout]); end
    if (out_l != (nout == NV - 1)) begin failures++; $display("FAIL last flag at %0d", nout); end
    nout++;
  end

  initial begin
    foreach (vals[i]) vals[i] = (i < 10) ? i : $urandom_range(0, 1 << 18);
    vals[NV-1] = 1 << 18;
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
