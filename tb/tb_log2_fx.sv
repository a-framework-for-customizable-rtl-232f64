// Testbench of log2_fx: streams operands (0, 1, powers of two, their
// neighbours and random values) one per cycle, compares each result with
// the real-valued log2 to within 4 LSB, and checks the latency FRAC + 1.
module tb_log2_fx;
  localparam int unsigned IW = 19, FRAC = 19, LW = $clog2(IW) + FRAC, LAT = FRAC + 1;
  localparam int unsigned NV = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_v, out_v;
  logic [IW-1:0] x;
  logic [LW-1:0] y;

  log2_fx #(.IW(IW), .FRAC(FRAC)) dut (.clk, .rst_n, .in_valid_i(in_v), .x_i(x),
                                      .out_valid_o(out_v), .y_o(y));

  int checks = 0, failures = 0;
  int unsigned vals [NV];
  int sent_cyc [NV];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_v) begin
    real e, g;
    e = (vals[nout] == 0) ? 0.0 : $ln(real'(vals[nout])) / $ln(2.0);
    g = real'(y) / real'(1 << FRAC);
    checks += 2;
    if (g - e > 4.0 / (1 << FRAC) || e - g > 4.0 / (1 << FRAC)) begin
      failures++; $display("FAIL log2(%0d) = %f expected %f", vals[nout], g, e);
    end
    if (cyc - sent_cyc[nout] != LAT) begin
      failures++; $display("FAIL latency %0d", cyc - sent_cyc[nout]);
    end
    nout++;
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      if (i < 20)      vals[i] = i;
      else if (i < 58) vals[i] = (1 << ((i - 20) / 2)) + ((i % 2) ? 1 : 0) - ((i % 2) ? 0 : 0);
      else             vals[i] = $urandom_range(1, (1 << IW) - 1);
    end
    vals[NV-1] = (1 << IW) - 1;
    in_v = 1'b0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_v = ($urandom_range(0, 3) != 0) || 1'b1;
      x = IW'(vals[i]);
      sent_cyc[i] = cyc + 1;
    end
    @(negedge clk) in_v = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (nout != NV) begin failures++; $display("FAIL %0d results of %0d", nout, NV); end
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
