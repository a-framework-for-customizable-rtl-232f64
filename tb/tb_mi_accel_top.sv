// End-to-end testbench of the MI accelerator at reduced size.
//
// Two cores (4-bit pixels, a 16-bit port so four histogram PEs, four
// entropy lanes, images of up to 1024 pixels), each on its own memory
// model; core 1's memory refuses requests on random cycles. Each core runs
// concurrently: a direct-mode MI of a partial image, a direct-mode MI of a
// full image, a reference prefetch, then two cached-mode MIs, one against
// an identical floating image (MI must equal H(ref)). Every result is
// compared with floating-point entropies computed from the pixel arrays;
// the cached-mode cycle count is checked against ISS/HPE + HS*HS/EPE plus
// pipeline and divider overhead. Counts how often each mechanism happened
// (accumulator hit, write-back, bypass, memory stall, direct fetch,
// prefetch, cached fetch, concurrent cores) and fails on any that never
// did.
module tb_mi_accel_top;
  import mi_ref_pkg::*;

  localparam int unsigned NCORE = 2;
  localparam int unsigned IBW   = 4;
  localparam int unsigned MBW   = 16;
  localparam int unsigned HPE   = MBW / IBW;
  localparam int unsigned EPE   = 4;
  localparam int unsigned ISS   = 1024;
  localparam int unsigned HS    = 1 << IBW;
  localparam int unsigned NW    = ISS / HPE;
  localparam int unsigned NWW   = $clog2(NW + 1);
  localparam int unsigned AW    = 32;
  localparam int unsigned ETW   = 42;
  localparam int unsigned FRAC  = 19;
  localparam int unsigned DEPTH = 4 * NW;
  localparam real         TOL   = 2.0e-3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCORE-1:0]          start, load_ref, busy, done, cached;
  logic [NCORE-1:0][AW-1:0]  ref_base, flt_base;
  logic [NCORE-1:0][NWW-1:0] n_words;
  logic [NCORE-1:0][ETW-1:0] mi, hr, hf, hj;
  logic [NCORE-1:0]          req_v, gnt, rsp_v;
  logic [NCORE-1:0][AW-1:0]  req_a;
  logic [NCORE-1:0][MBW-1:0] rsp_d;

  mi_accel_top #(.NCORE(NCORE), .IBW(IBW), .MBW(MBW), .EPE(EPE), .ISS(ISS),
                 .CACHE(1'b1)) dut (
    .clk, .rst_n,
    .start_i(start), .load_ref_i(load_ref), .ref_base_i(ref_base),
    .flt_base_i(flt_base), .n_words_i(n_words),
    .busy_o(busy), .done_o(done), .ref_cached_o(cached),
    .mi_o(mi), .h_ref_o(hr), .h_flt_o(hf), .h_joint_o(hj),
    .mem_req_valid_o(req_v), .mem_req_addr_o(req_a), .mem_gnt_i(gnt),
    .mem_rsp_valid_i(rsp_v), .mem_rsp_data_i(rsp_d)
  );

  mem_model #(.MBW(MBW), .AW(AW), .DEPTH(DEPTH), .LAT(3), .STALL(1'b0)) u_mem0 (
    .clk, .rst_n, .req_valid_i(req_v[0]), .req_addr_i(req_a[0]), .gnt_o(gnt[0]),
    .rsp_valid_o(rsp_v[0]), .rsp_data_o(rsp_d[0]));
  mem_model #(.MBW(MBW), .AW(AW), .DEPTH(DEPTH), .LAT(5), .STALL(1'b1)) u_mem1 (
    .clk, .rst_n, .req_valid_i(req_v[1]), .req_addr_i(req_a[1]), .gnt_o(gnt[1]),
    .rsp_valid_o(rsp_v[1]), .rsp_data_o(rsp_d[1]));

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_hit = 0, n_wb = 0, n_byp = 0, n_direct = 0, n_prefetch = 0,
      n_cached = 0, n_both = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_core[0].u_core.g_pe[0].u_pe.s1_valid && dut.g_core[0].u_core.g_pe[0].u_pe.hit)
      n_hit++;
    if (dut.g_core[0].u_core.g_pe[0].u_pe.wb_en) n_wb++;
    if (dut.g_core[0].u_core.g_pe[0].u_pe.s1_valid && dut.g_core[0].u_core.g_pe[0].u_pe.byp)
      n_byp++;
    if (busy[0] && busy[1] && dut.g_core[0].u_core.state == mi_pkg::CORE_HIST &&
        dut.g_core[1].u_core.state == mi_pkg::CORE_HIST) n_both++;
  end

  // Image store: image k of core c occupies words [k*NW, (k+1)*NW).
  int unsigned img [NCORE][4][ISS];

  task automatic make_images(input int c);
    for (int i = 0; i < ISS; i++) begin
      // reference: blocks of repeated values per PE lane
      if (i >= int'(HPE) && $urandom_range(0, 1) == 0) img[c][0][i] = img[c][0][i - HPE];
      else img[c][0][i] = $urandom_range(0, HS - 1);
      // floating 1: reference plus small noise (correlated)
      img[c][1][i] = (img[c][0][i] + $urandom_range(0, 2)) % HS;
      // floating 2: independent noise
      img[c][2][i] = $urandom_range(0, HS - 1);
      // floating 3: identical to the reference
      img[c][3][i] = img[c][0][i];
    end
    for (int k = 0; k < 4; k++)
      for (int w = 0; w < int'(NW); w++) begin
        logic [MBW-1:0] word = '0;
        for (int p = 0; p < int'(HPE); p++) word[IBW*p +: IBW] = IBW'(img[c][k][w*HPE + p]);
        if (c == 0) u_mem0.mem[k*NW + w] = word;
        else        u_mem1.mem[k*NW + w] = word;
      end
  endtask

  task automatic check_result(input int c, input int k, input int nw, input string what);
    int unsigned rp[], fp[];
    real er, ef, ej, em, gm;
    rp = new[nw * HPE];
    fp = new[nw * HPE];
    foreach (rp[i]) begin rp[i] = img[c][0][i]; fp[i] = img[c][k][i]; end
    mi_of(rp, fp, HS, er, ef, ej, em);
    gm = fx2r(longint'($signed(mi[c])), FRAC);
    checks += 4;
    if ((gm - em) > TOL || (em - gm) > TOL) begin
      failures++;
      $display("FAIL core%0d %s: MI %f expected %f", c, what, gm, em);
    end
    if (fx2r(longint'($signed(hr[c])), FRAC) - er > TOL || er - fx2r(longint'($signed(hr[c])), FRAC) > TOL) begin
      failures++; $display("FAIL core%0d %s: H(ref)", c, what);
    end
    if (fx2r(longint'($signed(hf[c])), FRAC) - ef > TOL || ef - fx2r(longint'($signed(hf[c])), FRAC) > TOL) begin
      failures++; $display("FAIL core%0d %s: H(flt)", c, what);
    end
    if (fx2r(longint'($signed(hj[c])), FRAC) - ej > TOL || ej - fx2r(longint'($signed(hj[c])), FRAC) > TOL) begin
      failures++; $display("FAIL core%0d %s: H(joint)", c, what);
    end
    $display("core%0d %-10s MI=%f (ref %f) H=%f/%f/%f", c, what, gm, em,
             fx2r(longint'($signed(hr[c])), FRAC), fx2r(longint'($signed(hf[c])), FRAC),
             fx2r(longint'($signed(hj[c])), FRAC));
  endtask

  task automatic run_mi(input int c, input int k, input int nw, input string what,
                        output int cycles);
    @(negedge clk);
    ref_base[c] = 0;
    flt_base[c] = AW'(k * NW);
    n_words[c]  = NWW'(nw);
    start[c]    = 1'b1;
    @(negedge clk);
    start[c] = 1'b0;
    cycles = 1;
    while (!done[c]) begin @(negedge clk); cycles++; end
    check_result(c, k, nw, what);
  endtask

  task automatic core_seq(input int c);
    int cyc;
    // direct mode, quarter image, then full image
    run_mi(c, 1, NW / 4, "direct/4", cyc);
    n_direct++;
    run_mi(c, 2, NW, "direct", cyc);
    n_direct++;
    // prefetch the reference
    @(negedge clk);
    ref_base[c] = 0; n_words[c] = NWW'(NW); load_ref[c] = 1'b1;
    @(negedge clk);
    load_ref[c] = 1'b0;
    while (busy[c]) @(negedge clk);
    checks++;
    if (!cached[c]) begin failures++; $display("FAIL core%0d: reference not cached", c); end
    n_prefetch++;
    // cached mode
    run_mi(c, 1, NW, "cached", cyc);
    n_cached++;
    if (c == 0) begin
      // hist NW + drain HS*HS/EPE + lanes + divider (3*(ETW+1)) + margins
      int lo = NW + HS * HS / EPE;
      int hi = lo + 3 * (ETW + 1) + 2 * (FRAC + 2) + 40;
      checks++;
      if (cyc < lo || cyc > hi) begin
        failures++; $display("FAIL cached latency %0d not in [%0d,%0d]", cyc, lo, hi);
      end else $display("cached MI latency %0d cycles (bounds %0d..%0d)", cyc, lo, hi);
    end
    run_mi(c, 3, NW, "identical", cyc);
    n_cached++;
    checks++;
    if (mi[c] != hr[c]) begin
      failures++; $display("FAIL core%0d: MI of identical images differs from H(ref)", c);
    end
  endtask

  initial begin
    start = '0; load_ref = '0; ref_base = '0; flt_base = '0; n_words = '0;
    for (int c = 0; c < NCORE; c++) make_images(c);
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (|busy) @(negedge clk);
    fork
      core_seq(0);
      core_seq(1);
    join
    $display("mechanisms: hit=%0d writeback=%0d bypass=%0d stall=%0d direct=%0d prefetch=%0d cached=%0d concurrent=%0d",
             n_hit, n_wb, n_byp, u_mem1.stall_cnt, n_direct, n_prefetch, n_cached, n_both);
    checks += 8;
    if (n_hit == 0)             begin failures++; $display("FAIL: no accumulator hit"); end
    if (n_wb == 0)              begin failures++; $display("FAIL: no write-back"); end
    if (n_byp == 0)             begin failures++; $display("FAIL: no bypass"); end
    if (u_mem1.stall_cnt == 0)  begin failures++; $display("FAIL: no memory stall"); end
    if (n_direct == 0)          begin failures++; $display("FAIL: no direct fetch"); end
    if (n_prefetch == 0)        begin failures++; $display("FAIL: no prefetch"); end
    if (n_cached == 0)          begin failures++; $display("FAIL: no cached fetch"); end
    if (n_both == 0)            begin failures++; $display("FAIL: cores never ran together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
