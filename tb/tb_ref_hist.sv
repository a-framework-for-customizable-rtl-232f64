// Testbench of ref_hist (8-entry histograms, two counts per beat): three
// random joint histograms are streamed row-major with idle gaps; the
// packed output beats must equal the row sums computed here, in order,
// with the last flag on the final beat.
module tb_ref_hist;
  localparam int unsigned HS = 8, EPE = 2, CW = 12, BPR = HS / EPE;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iv, il, ov, ol;
  logic [EPE-1:0][CW-1:0] ic, oc;

  ref_hist #(.HS(HS), .EPE(EPE), .CW(CW)) dut (
    .clk, .rst_n, .in_valid_i(iv), .in_cnt_i(ic), .in_last_i(il),
    .out_valid_o(ov), .out_cnt_o(oc), .out_last_o(ol));

  int checks = 0, failures = 0;
  int unsigned expq [$];
  int nout = 0, nlast = 0;

  always @(posedge clk) if (rst_n && ov) begin
    for (int e = 0; e < int'(EPE); e++) begin
      int unsigned x;
      x = expq.pop_front();
      checks++;
      if (oc[e] != CW'(x)) begin failures++; $display("FAIL entry %0d: %0d expected %0d", nout * EPE + e, oc[e], x); end
    end
    nout++;
    checks++;
    if (ol != (nout % BPR == 0)) begin failures++; $display("FAIL last flag at beat %0d", nout); end
    if (ol) nlast++;
  end

  initial begin
    iv = 0; il = 0; ic = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int h = 0; h < 3; h++) begin
      int unsigned j [HS][HS];
      int unsigned s;
      foreach (j[a, b]) j[a][b] = $urandom_range(0, 60);
      for (int a = 0; a < int'(HS); a++) begin
        s = 0;
        for (int b = 0; b < int'(HS); b++) s += (j[a][b]);
        expq.push_back(s);
      end
      for (int a = 0; a < int'(HS); a++)
        for (int b = 0; b < int'(BPR); b++) begin
          @(negedge clk);
          iv = 0; il = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
          iv = 1;
          il = (a == int'(HS) - 1) && (b == int'(BPR) - 1);
          for (int e = 0; e < int'(EPE); e++) ic[e] = CW'(j[a][b * EPE + e]);
        end
    end
    @(negedge clk) begin iv = 0; il = 0; end
    repeat (3) @(negedge clk);
    checks += 2;
    if (nout != 3 * int'(BPR)) begin failures++; $display("FAIL %0d beats", nout); end
    if (nlast != 3) begin failures++; $display("FAIL %0d last flags", nlast); end
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
