// Full-size testbench: the accelerator with every parameter at its default
// (one core, 8-bit pixels, 32-bit port, four histogram PEs, four entropy
// lanes, 512x512 images, reference cache, 23.19 fixed point).
//
// A synthetic 512x512 reference image (smooth blobs plus noise) and a
// floating image derived from it by a shift and an intensity remapping are
// placed in the memory model. The testbench runs one direct-mode MI, a
// reference prefetch, and a cached-mode MI of a second floating image, and
// compares MI and entropies with floating-point values computed from the
// pixels. The cached run's cycle count is compared with the coarse latency
// ISS/HPE + HS*HS/EPE = 65536 + 16384 cycles plus pipeline and divider
// overhead.
module tb_mi_full;
  import mi_ref_pkg::*;
  localparam int unsigned ISS = 512 * 512, HPE = 4, NW = ISS / HPE, HS = 256, EPE = 4;
  localparam int unsigned FRAC = 19, ETW = 42;
  localparam real TOL = 2.0e-3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [0:0] start, load_ref, busy, done, cached, rq_v, gnt, rs_v;
  logic [0:0][31:0] rb, fb, rq_a, rs_d;
  logic [0:0][16:0] nw;
  logic [0:0][ETW-1:0] mi, hr, hf, hj;

  mi_accel_top dut (
    .clk, .rst_n, .start_i(start), .load_ref_i(load_ref), .ref_base_i(rb), .flt_base_i(fb),
    .n_words_i(nw), .busy_o(busy), .done_o(done), .ref_cached_o(cached),
    .mi_o(mi), .h_ref_o(hr), .h_flt_o(hf), .h_joint_o(hj),
    .mem_req_valid_o(rq_v), .mem_req_addr_o(rq_a), .mem_gnt_i(gnt),
    .mem_rsp_valid_i(rs_v), .mem_rsp_data_i(rs_d));

  mem_model #(.MBW(32), .AW(32), .DEPTH(3 * NW), .LAT(4), .STALL(1'b0)) u_mem (
    .clk, .rst_n, .req_valid_i(rq_v[0]), .req_addr_i(rq_a[0]), .gnt_o(gnt[0]),
    .rsp_valid_o(rs_v[0]), .rsp_data_o(rs_d[0]));

  int checks = 0, failures = 0;
  int unsigned img [3][ISS];

  task automatic chk(input real g, input real e, input string what);
    checks++;
    if (g - e > TOL || e - g > TOL) begin failures++; $display("FAIL %s %f expected %f", what, g, e); end
  endtask

  task automatic run(input int k, input string what, output int cycles);
    int unsigned a[], b[];
    real er, ef, ej, em;
    a = new[ISS]; b = new[ISS];
    foreach (a[i]) begin a[i] = img[0][i]; b[i] = img[k][i]; end
    mi_of(a, b, HS, er, ef, ej, em);
    @(negedge clk);
    rb[0] = 0; fb[0] = k * NW; nw[0] = NW; start[0] = 1;
    @(negedge clk);
    start[0] = 0; cycles = 1;
    while (!done[0]) begin @(negedge clk); cycles++; end
    chk(fx2r(longint'($signed(mi[0])), FRAC), em, {what, " MI"});
    chk(fx2r(longint'($signed(hr[0])), FRAC), er, {what, " H(ref)"});
    chk(fx2r(longint'($signed(hf[0])), FRAC), ef, {what, " H(flt)"});
    chk(fx2r(longint'($signed(hj[0])), FRAC), ej, {what, " H(joint)"});
    $display("%s: MI %f (expected %f), %0d cycles", what, fx2r(longint'($signed(mi[0])), FRAC), em, cycles);
  endtask

  initial begin
    int cyc;
    start = '0; load_ref = '0; rb = '0; fb = '0; nw = '0;
    // images
    for (int y = 0; y < 512; y++)
      for (int x = 0; x < 512; x++) begin
        int v, dx, dy;
        dx = x - 256; dy = y - 240;
        v = (dx * dx + dy * dy < 180 * 180) ? 90 : 10;
        if ((x - 200) * (x - 200) + (y - 220) * (y - 220) < 40 * 40) v = 200;
        if ((x - 320) * (x - 320) + (y - 280) * (y - 280) < 25 * 25) v = 150;
        img[0][y * 512 + x] = (v + $urandom_range(0, 20)) % 256;
      end
    for (int i = 0; i < int'(ISS); i++) begin
      int s;
      s = (i + 3 * 512 + 2) % ISS;                       // shifted
      img[1][i] = 255 - (img[0][s] * 3 / 4);             // remapped intensities
      img[2][i] = (img[0][i] / 2 + $urandom_range(0, 7)) % 256;
    end
    for (int k = 0; k < 3; k++)
      for (int w = 0; w < int'(NW); w++)
        u_mem.mem[k * NW + w] = {8'(img[k][4*w+3]), 8'(img[k][4*w+2]), 8'(img[k][4*w+1]), 8'(img[k][4*w])};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (busy[0]) @(negedge clk);
    run(1, "direct", cyc);
    checks++;
    if (cyc < 2 * int'(NW) + HS * HS / EPE) begin failures++; $display("FAIL direct run too fast"); end
    @(negedge clk);
    rb[0] = 0; nw[0] = NW; load_ref[0] = 1;
    @(negedge clk);
    load_ref[0] = 0;
    while (busy[0]) @(negedge clk);
    checks++;
    if (!cached[0]) begin failures++; $display("FAIL reference not cached"); end
    run(2, "cached", cyc);
    checks++;
    if (cyc < int'(NW) + HS * HS / EPE || cyc > int'(NW) + HS * HS / EPE + 300) begin
      failures++; $display("FAIL cached latency %0d", cyc);
    end
    $display("coarse latency ISS/HPE + HS*HS/EPE = %0d, measured %0d", NW + HS * HS / EPE, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
