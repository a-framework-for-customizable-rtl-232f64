// Testbench of entropy_sum: several histograms of random length, random
// lane terms and idle gaps; each emitted sum must equal the exact integer
// sum of all lane terms, one cycle after the last beat.
module tb_entropy_sum;
  localparam int unsigned EPE = 4, ETW = 42;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_v, in_l, s_v;
  logic [EPE-1:0][ETW-1:0] term;
  logic [ETW-1:0] s;

  entropy_sum #(.EPE(EPE), .ETW(ETW)) dut (.clk, .rst_n, .in_valid_i(in_v), .term_i(term),
                                          .in_last_i(in_l), .sum_valid_o(s_v), .sum_o(s));

  int checks = 0, failures = 0, nsum = 0;
  longint unsigned expq [$];

  always @(posedge clk) if (rst_n && s_v) begin
    longint unsigned e;
    e = expq.pop_front();
    checks++;
    if (s != ETW'(e)) begin failures++; $display("FAIL sum %0d expected %0d", s, e); end
    nsum++;
  end

  initial begin
    in_v = 0; in_l = 0; term = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int h = 0; h < 6; h++) begin
      int len;
      longint unsigned acc;
      len = $urandom_range(1, 40);
      acc = 0;
      for (int b = 0; b < len; b++) begin
        @(negedge clk);
        in_v = 0; in_l = 0;
        if ($urandom_range(0, 4) == 0) @(negedge clk);
        in_v = 1;
        in_l = (b == len - 1);
        for (int e = 0; e < int'(EPE); e++) begin
          term[e] = ETW'({$urandom, $urandom}) & ETW'(64'h3_FFFF_FFFF);
          acc += longint'(term[e]);
        end
        if (in_l) expq.push_back(acc);
      end
    end
    @(negedge clk) begin in_v = 0; in_l = 0; end
    repeat (3) @(negedge clk);
    checks++;
    if (nsum != 6) begin failures++; $display("FAIL %0d sums", nsum); end
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
