// Testbench helper: one accelerator configuration with its own memory.
//
// Instantiates mi_accel_top with the given core count, port width,
// entropy lanes, cache setting and entropy type, plus an in-order memory
// (fixed 3-cycle latency, always granting) per core. The task run() loads
// a reference and a floating image into every core's memory (512x512, or
// fewer pixels: the size of the arrays passed in), optionally prefetches
// the reference (cached configurations), starts all cores together and
// returns the MI of core 0 and the cycles from start to done of every core.
module mi_cfg_run #(
  parameter int unsigned NCORE = 1,
  parameter int unsigned MBW   = 32,
  parameter int unsigned EPE   = 4,
  parameter bit          CACHE = 1'b0,
  parameter bit          FLT   = 1'b0
) (
  input logic clk,
  input logic rst_n
);
  localparam int unsigned IBW = 8, ISS = 512 * 512, HPE = MBW / IBW, NW = ISS / HPE;
  localparam int unsigned NWW = $clog2(NW + 1), RW = FLT ? 32 : 42, LAT = 3;

  logic [NCORE-1:0]          start, load_ref, busy, done, cached, rq_v, rs_v;
  logic [NCORE-1:0][31:0]    rb, fb, rq_a;
  logic [NCORE-1:0][NWW-1:0] nw;
  logic [NCORE-1:0][RW-1:0]  mi, hr, hf, hj;
  logic [NCORE-1:0][MBW-1:0] rs_d;

  mi_accel_top #(.NCORE(NCORE), .MBW(MBW), .EPE(EPE), .CACHE(CACHE),
                 .ET_FLT(FLT)) dut (
    .clk, .rst_n, .start_i(start), .load_ref_i(load_ref), .ref_base_i(rb), .flt_base_i(fb),
    .n_words_i(nw), .busy_o(busy), .done_o(done), .ref_cached_o(cached),
    .mi_o(mi), .h_ref_o(hr), .h_flt_o(hf), .h_joint_o(hj),
    .mem_req_valid_o(rq_v), .mem_req_addr_o(rq_a), .mem_gnt_i({NCORE{1'b1}}),
    .mem_rsp_valid_i(rs_v), .mem_rsp_data_i(rs_d));

  // Memory: reference at words [0, NW), floating at [NW, 2*NW).
  logic [MBW-1:0] mem [2 * NW];
  logic [NCORE-1:0]          v_p [LAT];
  logic [NCORE-1:0][MBW-1:0] d_p [LAT];
  always_ff @(posedge clk) begin
    for (int c = 0; c < int'(NCORE); c++) begin
      v_p[0][c] <= rst_n && rq_v[c];
      d_p[0][c] <= mem[rq_a[c] % (2 * NW)];
    end
    for (int i = 1; i < int'(LAT); i++) begin
      v_p[i] <= v_p[i-1];
      d_p[i] <= d_p[i-1];
    end
  end
  assign rs_v = v_p[LAT-1];
  assign rs_d = d_p[LAT-1];

  initial begin
    start = '0; load_ref = '0; rb = '0; fb = '0; nw = '0;
  end

  task automatic run(input int unsigned rp[], input int unsigned fp[],
                     output real mi0, output int cycles[]);
    int unsigned pending;
    int cyc, nwr;
    nwr = rp.size() / HPE;
    for (int w = 0; w < nwr; w++)
      for (int p = 0; p < int'(HPE); p++) begin
        mem[w][IBW*p +: IBW]      = IBW'(rp[w * HPE + p]);
        mem[NW + w][IBW*p +: IBW] = IBW'(fp[w * HPE + p]);
      end
    cycles = new[NCORE];
    @(negedge clk);
    while (|busy) @(negedge clk);
    if (CACHE) begin
      rb = '0; nw = {NCORE{NWW'(nwr)}}; load_ref = '1;
      @(negedge clk);
      load_ref = '0;
      while (|busy) @(negedge clk);
    end
    fb = {NCORE{32'(NW)}}; nw = {NCORE{NWW'(nwr)}}; start = '1;
    @(negedge clk);
    start = '0;
    pending = (1 << NCORE) - 1;
    cyc = 1;
    while (pending != 0) begin
      for (int c = 0; c < int'(NCORE); c++)
        if (done[c] && pending[c]) begin cycles[c] = cyc; pending[c] = 1'b0; end
      @(negedge clk);
      cyc++;
    end
    if (FLT) mi0 = mi_ref_pkg::f2r(32'(mi[0]));
    else     mi0 = real'($signed(mi[0])) / real'(1 << 19);
  endtask
endmodule
