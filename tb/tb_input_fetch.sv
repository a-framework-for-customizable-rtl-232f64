// Testbench of input_fetch (4-bit pixels, 16-bit words, 64-word images)
// on a memory model that refuses requests on random cycles. Runs a direct
// fetch, a reference prefetch and a cached fetch; every pixel pair must
// match the images in memory in order, the last flag must mark the final
// pair, and the cached fetch on a memory that never stalls must deliver one
// word pair per cycle while the direct fetch needs two cycles per pair.
module tb_input_fetch;
  localparam int unsigned IBW = 4, HPE = 4, MBW = 16, NW = 64, AW = 32, NWW = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, prefetch, busy, cached;
  logic [AW-1:0] rb, fb;
  logic [NWW-1:0] nw;
  logic rq_v, gnt, rs_v, pv, pl;
  logic [AW-1:0] rq_a;
  logic [MBW-1:0] rs_d;
  logic [HPE-1:0][IBW-1:0] pr, pf;
  logic stall_en;

  input_fetch #(.IBW(IBW), .HPE(HPE), .MBW(MBW), .CACHE(1'b1), .CDEPTH(NW), .AW(AW), .NWW(NWW)) dut (
    .clk, .rst_n, .start_i(start), .prefetch_i(prefetch), .ref_base_i(rb), .flt_base_i(fb),
    .n_words_i(nw), .busy_o(busy), .ref_cached_o(cached),
    .mem_req_valid_o(rq_v), .mem_req_addr_o(rq_a), .mem_gnt_i(gnt),
    .mem_rsp_valid_i(rs_v), .mem_rsp_data_i(rs_d),
    .pix_valid_o(pv), .pix_ref_o(pr), .pix_flt_o(pf), .pix_last_o(pl));

  // Small in-order memory with optional random stalls.
  logic [MBW-1:0] mem [256];
  logic [MBW-1:0] d1, d2;
  logic v1, v2, g;
  assign gnt  = g;
  assign rs_v = v2;
  assign rs_d = d2;
  int nstall = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin v1 <= 0; v2 <= 0; g <= 1; end
    else begin
      g  <= stall_en ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (rq_v && !g) nstall <= nstall + 1;
      v1 <= rq_v && g; d1 <= mem[rq_a[7:0]];
      v2 <= v1;        d2 <= d1;
    end
  end

  int checks = 0, failures = 0, npair = 0, cyc = 0;
  int unsigned ref_w, flt_w;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && pv) begin
    checks += 2 * HPE + 1;
    for (int k = 0; k < int'(HPE); k++) begin
      if (pr[k] != mem[ref_w + npair][IBW*k +: IBW]) begin failures++; $display("FAIL ref pixel %0d.%0d", npair, k); end
      if (pf[k] != mem[flt_w + npair][IBW*k +: IBW]) begin failures++; $display("FAIL flt pixel %0d.%0d", npair, k); end
    end
    if (pl != (npair == int'(NW) - 1)) begin failures++; $display("FAIL last flag at %0d", npair); end
    npair++;
  end

  task automatic cmd(input bit pf_cmd, input int unsigned fbase, output int cycles);
    @(negedge clk);
    npair = 0; rb = 0; fb = fbase; nw = NWW'(NW); flt_w = fbase; ref_w = 0;
    start = !pf_cmd; prefetch = pf_cmd;
    @(negedge clk);
    start = 0; prefetch = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int c_direct, c_pref, c_cached;
    foreach (mem[i]) mem[i] = MBW'($urandom);
    start = 0; prefetch = 0; rb = '0; fb = '0; nw = '0; stall_en = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd(0, 64, c_direct);
    checks++; if (npair != int'(NW)) begin failures++; $display("FAIL direct pairs %0d", npair); end
    cmd(1, 0, c_pref);
    checks++; if (!cached) begin failures++; $display("FAIL not cached"); end
    checks++; if (npair != 0) begin failures++; $display("FAIL prefetch produced pairs"); end
    stall_en = 0;
    cmd(0, 128, c_cached);
    checks++; if (npair != int'(NW)) begin failures++; $display("FAIL cached pairs %0d", npair); end
    checks++; if (c_cached > int'(NW) + 6) begin failures++; $display("FAIL cached fetch took %0d cycles", c_cached); end
    cmd(0, 192, c_cached);
    $display("direct %0d cycles, prefetch %0d, cached %0d, stalls %0d", c_direct, c_pref, c_cached, nstall);
    checks += 2;
    if (c_direct < 2 * int'(NW)) begin failures++; $display("FAIL direct faster than the shared port allows"); end
    if (nstall == 0) begin failures++; $display("FAIL no stall"); end
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
