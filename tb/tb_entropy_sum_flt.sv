// Testbench of entropy_sum_flt: several histograms of random length with
// random positive float lane terms and idle gaps. The expected sum repeats
// the adder order (lanes in order, then the accumulator) with each addition
// done in double precision, exact for the chosen ranges, and rounded to
// single precision, so every emitted sum must match bit for bit. A second
// pass with integer-valued terms must give the exact integer total.
module tb_entropy_sum_flt;
  import mi_ref_pkg::*;
  localparam int unsigned EPE = 4, NH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_v, in_l, s_v;
  logic [EPE-1:0][31:0] term;
  logic [31:0] s;

  entropy_sum_flt #(.EPE(EPE)) dut (.clk, .rst_n, .in_valid_i(in_v), .term_i(term),
                                    .in_last_i(in_l), .sum_valid_o(s_v), .sum_o(s));

  int checks = 0, failures = 0, nsum = 0;
  logic [31:0] expq [$];
  real sumq [$];

  always @(posedge clk) if (rst_n && s_v) begin
    logic [31:0] e;
    real r;
    e = expq.pop_front();
    r = sumq.pop_front();
    checks += 2;
    if (s != e) begin failures++; $display("FAIL sum %h (%f) expected %h (%f)", s, f2r(s), e, f2r(e)); end
    if (f2r(s) - r > r * 1.0e-5 || r - f2r(s) > r * 1.0e-5) begin
      failures++; $display("FAIL sum %f far from %f", f2r(s), r);
    end
    nsum++;
  end

  initial begin
    in_v = 0; in_l = 0; term = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int h = 0; h < NH; h++) begin
      int len;
      logic [31:0] acc, bs;
      real exact;
      len = (h == 0) ? 1 : $urandom_range(2, 60);
      acc = '0;
      exact = 0.0;
      for (int b = 0; b < len; b++) begin
        @(negedge clk);
        in_v = 0; in_l = 0;
        if ($urandom_range(0, 4) == 0) @(negedge clk);
        in_v = 1;
        in_l = (b == len - 1);
        for (int e = 0; e < int'(EPE); e++) begin
          if (h < NH / 2)
            term[e] = r2f(real'($urandom_range(0, 1 << 20)) * (1.0 + real'($urandom_range(0, 1 << 22)) / (1 << 22)));
          else
            term[e] = r2f(real'($urandom_range(0, 1 << 16)));
          exact += f2r(term[e]);
        end
        bs = term[0];
        for (int e = 1; e < int'(EPE); e++) bs = r2f(f2r(bs) + f2r(term[e]));
        acc = r2f(f2r(acc) + f2r(bs));
        if (in_l) begin expq.push_back(acc); sumq.push_back(exact); end
      end
    end
    @(negedge clk) begin in_v = 0; in_l = 0; end
    repeat (3) @(negedge clk);
    checks++;
    if (nsum != NH) begin failures++; $display("FAIL %0d sums", nsum); end
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
