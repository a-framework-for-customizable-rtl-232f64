// Testbench of joint_hist_pe (3-bit pixels, two counts per row, so a
// 64-bin histogram in 32 rows). Three images are streamed: one with long
// runs of equal pairs (accumulator hits), one of random pairs with an
// a-b-a pattern forced often (write-back forwarded to a simultaneous read),
// and one with idle gaps. After each image the drained histogram must equal
// the one counted here, must start 3 cycles after the last pair and last
// HS*HS/EPE cycles; running three images back to back also checks that the
// read-out clears the memory.
module tb_joint_hist_pe;
  localparam int unsigned IBW = 3, EPE = 2, CW = 10;
  localparam int unsigned NB = 1 << (2 * IBW), DEPTH = NB / EPE;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_v, in_l, ready, out_v, out_l;
  logic [IBW-1:0] r, f;
  logic [EPE-1:0][CW-1:0] cnt;

  joint_hist_pe #(.IBW(IBW), .EPE(EPE), .CW(CW)) dut (
    .clk, .rst_n, .in_valid_i(in_v), .ref_i(r), .flt_i(f), .in_last_i(in_l),
    .ready_o(ready), .out_valid_o(out_v), .out_cnt_o(cnt), .out_last_o(out_l));

  int checks = 0, failures = 0, cyc = 0;
  int unsigned hist [NB];
  int nbyp = 0, nhit = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.s1_valid && dut.byp) nbyp++;
    if (rst_n && dut.s1_valid && dut.hit) nhit++;
  end

  task automatic send(input int mode, input int n);
    int unsigned pr, pf, a;
    int last_cyc, first_out, nbeat;
    foreach (hist[i]) hist[i] = 0;
    pr = 0; pf = 0; a = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_v = 0;
      if (mode == 2 && $urandom_range(0, 2) == 0) @(negedge clk);
      case (mode)
        0: if ($urandom_range(0, 5) == 0) begin pr = $urandom_range(0, 7); pf = $urandom_range(0, 7); end
        default: begin
          if (i % 3 == 2 && $urandom_range(0, 1) == 0) {pr, pf} = a;  // a b a
          else begin pr = $urandom_range(0, 7); pf = $urandom_range(0, 7); end
          if (i % 3 == 0) a = {pr, pf};
        end
      endcase
      in_v = 1; r = IBW'(pr); f = IBW'(pf); in_l = (i == n - 1);
      hist[pr * (1 << IBW) + pf]++;
    end
    last_cyc = cyc + 1;
    @(negedge clk) begin in_v = 0; in_l = 0; end
    first_out = -1; nbeat = 0;
    while (nbeat < int'(DEPTH)) begin
      @(posedge clk);
      #1;
      if (out_v) begin
        if (first_out < 0) first_out = cyc;
        for (int e = 0; e < int'(EPE); e++) begin
          checks++;
          if (cnt[e] != CW'(hist[nbeat * EPE + e])) begin
            failures++;
            $display("FAIL mode %0d bin %0d: %0d expected %0d", mode, nbeat * EPE + e, cnt[e], hist[nbeat * EPE + e]);
          end
        end
        checks++;
        if (out_l != (nbeat == int'(DEPTH) - 1)) begin failures++; $display("FAIL last flag"); end
        nbeat++;
      end
    end
    checks += 2;
    if (first_out - last_cyc != 3) begin failures++; $display("FAIL read-out started after %0d cycles", first_out - last_cyc); end
    if (cyc - first_out + 1 != int'(DEPTH)) begin failures++; $display("FAIL read-out took %0d cycles", cyc - first_out + 1); end
    @(negedge clk);
    while (!ready) @(negedge clk);
  endtask

  initial begin
    in_v = 0; in_l = 0; r = '0; f = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!ready) @(negedge clk);
    send(0, 300);
    send(1, 500);
    send(2, 400);
    $display("hits=%0d bypasses=%0d", nhit, nbyp);
    checks += 2;
    if (nhit == 0) begin failures++; $display("FAIL no hit"); end
    if (nbyp == 0) begin failures++; $display("FAIL no bypass"); end
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
