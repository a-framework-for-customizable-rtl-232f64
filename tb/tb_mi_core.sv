// Testbench of mi_core in a second configuration: no cache, two histogram
// PEs (8-bit port, 4-bit pixels) and one entropy lane, on a memory model.
// Several image pairs (random, correlated, identical, constant) of full and
// partial size are processed in turn; MI and entropies must match the
// floating-point definitions, and each run must take at least
// 2*n_words + HS*HS/EPE cycles (shared port, then drain) and not much more.
module tb_mi_core;
  import mi_ref_pkg::*;
  localparam int unsigned IBW = 4, MBW = 8, HPE = 2, EPE = 1, ISS = 512, HS = 16;
  localparam int unsigned NW = ISS / HPE, NWW = $clog2(NW + 1), AW = 32, ETW = 42, FRAC = 19;
  localparam real TOL = 2.0e-3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, load_ref, busy, done, cached;
  logic [AW-1:0] rb, fb;
  logic [NWW-1:0] nw;
  logic signed [ETW-1:0] mi, hr, hf, hj;
  logic rq_v, gnt, rs_v;
  logic [AW-1:0] rq_a;
  logic [MBW-1:0] rs_d;

  mi_core #(.IBW(IBW), .MBW(MBW), .EPE(EPE), .ISS(ISS), .CACHE(1'b0)) dut (
    .clk, .rst_n, .start_i(start), .load_ref_i(load_ref), .ref_base_i(rb), .flt_base_i(fb),
    .n_words_i(nw), .busy_o(busy), .done_o(done), .ref_cached_o(cached),
    .mi_o(mi), .h_ref_o(hr), .h_flt_o(hf), .h_joint_o(hj),
    .mem_req_valid_o(rq_v), .mem_req_addr_o(rq_a), .mem_gnt_i(gnt),
    .mem_rsp_valid_i(rs_v), .mem_rsp_data_i(rs_d));

  mem_model #(.MBW(MBW), .AW(AW), .DEPTH(2 * NW), .LAT(2), .STALL(1'b0)) u_mem (
    .clk, .rst_n, .req_valid_i(rq_v), .req_addr_i(rq_a), .gnt_o(gnt),
    .rsp_valid_o(rs_v), .rsp_data_o(rs_d));

  int checks = 0, failures = 0;
  int unsigned rp [ISS], fp [ISS];

  task automatic chk(input real g, input real e, input string what);
    checks++;
    if (g - e > TOL || e - g > TOL) begin failures++; $display("FAIL %s %f expected %f", what, g, e); end
  endtask

  initial begin
    start = 0; load_ref = 0; rb = 0; fb = AW'(NW); nw = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    for (int t = 0; t < 5; t++) begin
      int unsigned a[], b[];
      real er, ef, ej, em;
      int words, cyc;
      words = (t == 4) ? 37 : NW;
      for (int i = 0; i < int'(ISS); i++) begin
        rp[i] = $urandom_range(0, HS - 1);
        case (t)
          0: fp[i] = $urandom_range(0, HS - 1);
          1: fp[i] = (rp[i] * 3 + $urandom_range(0, 1)) % HS;
          2: fp[i] = rp[i];
          3: begin rp[i] = 5; fp[i] = 9; end
          default: fp[i] = HS - 1 - rp[i];
        endcase
      end
      for (int w = 0; w < int'(NW); w++) begin
        u_mem.mem[w]      = MBW'({IBW'(rp[2*w+1]), IBW'(rp[2*w])});
        u_mem.mem[NW + w] = MBW'({IBW'(fp[2*w+1]), IBW'(fp[2*w])});
      end
      a = new[words * HPE]; b = new[words * HPE];
      foreach (a[i]) begin a[i] = rp[i]; b[i] = fp[i]; end
      mi_of(a, b, HS, er, ef, ej, em);
      @(negedge clk);
      nw = NWW'(words); start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(fx2r(longint'(mi), FRAC), em, "MI");
      chk(fx2r(longint'(hr), FRAC), er, "H(ref)");
      chk(fx2r(longint'(hf), FRAC), ef, "H(flt)");
      chk(fx2r(longint'(hj), FRAC), ej, "H(joint)");
      checks++;
      if (cyc < 2 * words + HS * HS / EPE || cyc > 2 * words + HS * HS / EPE + 3 * (ETW + 1) + 2 * (FRAC + 2) + 40) begin
        failures++; $display("FAIL run %0d took %0d cycles", t, cyc);
      end
      $display("run %0d: MI %f (expected %f), %0d cycles", t, fx2r(longint'(mi), FRAC), em, cyc);
      @(negedge clk);
      while (busy) @(negedge clk);
    end
    // load_ref is ignored without a cache
    @(negedge clk) load_ref = 1;
    @(negedge clk) load_ref = 0;
    checks++;
    if (busy || cached) begin failures++; $display("FAIL load_ref acted without a cache"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
