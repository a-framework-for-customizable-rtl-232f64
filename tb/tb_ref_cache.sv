// Testbench of ref_cache: fills a 256-word cache, then reads it back in
// random order with simultaneous writes to other words; read data must
// appear one cycle after the request and match the model array.
module tb_ref_cache;
  localparam int unsigned DEPTH = 256, W = 32, AW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, re;
  logic [AW-1:0] wa, ra;
  logic [W-1:0] wd, rd;

  ref_cache #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd),
                                         .re_i(re), .raddr_i(ra), .rdata_o(rd));

  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];

  initial begin
    we = 0; re = 0; wa = '0; ra = '0; wd = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1; wa = AW'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk) we = 0;
    for (int k = 0; k < 500; k++) begin
      logic [W-1:0] e;
      @(negedge clk);
      re = 1; ra = AW'($urandom_range(0, DEPTH - 1));
      e = model[ra];
      we = $urandom_range(0, 1); wa = ra + 8'd1; wd = $urandom;
      if (we) model[wa] = wd;
      @(negedge clk);
      re = 0; we = 0;
      checks++;
      if (rd != e) begin failures++; $display("FAIL word %0d", ra); end
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
