// Testbench of joint_hist_sum: random partial counts from four PEs, beats
// with gaps; each output lane must be the sum of the inputs one cycle
// later, with the last flag carried.
module tb_joint_hist_sum;
  localparam int unsigned HPE = 4, EPE = 2, CW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [HPE-1:0] iv, il;
  logic [HPE-1:0][EPE-1:0][CW-1:0] ic;
  logic ov, ol;
  logic [EPE-1:0][CW-1:0] oc;

  joint_hist_sum #(.HPE(HPE), .EPE(EPE), .CW(CW)) dut (
    .clk, .rst_n, .in_valid_i(iv), .in_cnt_i(ic), .in_last_i(il),
    .out_valid_o(ov), .out_cnt_o(oc), .out_last_o(ol));

  int checks = 0, failures = 0;

  initial begin
    iv = '0; il = '0; ic = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 200; b++) begin
      int unsigned exp_s [EPE];
      logic v, l;
      v = ($urandom_range(0, 3) != 0);
      l = (b % 17 == 16);
      foreach (exp_s[e]) exp_s[e] = 0;
      for (int p = 0; p < int'(HPE); p++)
        for (int e = 0; e < int'(EPE); e++) begin
          ic[p][e] = CW'($urandom_range(0, (1 << (CW - 2)) - 1));
          exp_s[e] += ic[p][e];
        end
      iv = {HPE{v}}; il = {HPE{l}};
      @(negedge clk);
      checks += 2;
      if (ov != v || (v && ol != l)) begin failures++; $display("FAIL valid/last at beat %0d", b); end
      if (v) for (int e = 0; e < int'(EPE); e++)
        if (oc[e] != CW'(exp_s[e])) begin failures++; $display("FAIL lane %0d", e); end
    end
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
