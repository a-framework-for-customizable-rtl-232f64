// One mutual-information core: the nine-stage dataflow pipeline.
//
//   Stage 1  input_fetch     memory words -> HPE pixel pairs per cycle
//   Stage 2  joint_hist_pe   HPE partial joint histograms
//   Stage 3  joint_hist_sum  complete joint histogram, EPE counts per beat
//   Stage 4  (fan-out)       the joint stream feeds three branches
//   Stage 5  ref_hist / flt_hist   row and column sums
//   Stage 6  (lane split)    each EPE-wide beat feeds EPE entropy lanes
//   Stage 7  entropy_pe      c*log2(c) per count, EPE lanes per branch
//   Stage 8  entropy_sum     one unscaled entropy sum per branch
//   Stage 9  mi_calc         entropies and MI, scaled by the pixel count
//
// ET_FLT = 0 builds stages 7-9 in fixed point (ET_INT.ET_FRAC, results two's
// complement); ET_FLT = 1 builds them in IEEE single precision
// (entropy_pe_flt, entropy_sum_flt, mi_calc_flt, results are floats).
//
// The sequencer accepts two commands while idle: load_ref_i prefetches the
// reference image into the on-chip cache (CACHE = 1 only), start_i computes
// the MI of the images at ref_base_i / flt_base_i, n_words_i memory words
// each (at most ISS/HPE). With a cached reference, start_i uses the cached
// image and its size. done_o pulses when mi_o and the entropies are valid.
// After reset the core is busy for HS*HS/EPE cycles while the histogram
// memories are zeroed.
//
// Timing: about ISS/HPE cycles (cached) or 2*ISS/HPE (direct, shared port)
// to build the histograms, then HS*HS/EPE cycles to drain them through the
// entropy stages, then the Stage 9 division (about 3*ETW cycles).
// All stages accept a beat every cycle, so no stream needs backpressure;
// streams are registered valid/last/data bundles.
module mi_core #(
  parameter int unsigned IBW     = mi_pkg::IBW,
  parameter int unsigned MBW     = mi_pkg::MBW,
  parameter int unsigned EPE     = mi_pkg::EPE,
  parameter int unsigned ISS     = mi_pkg::ISS,
  parameter bit          CACHE   = mi_pkg::CACHE,
  parameter int unsigned ET_INT  = mi_pkg::ET_INT,
  parameter int unsigned ET_FRAC = mi_pkg::ET_FRAC,
  parameter bit          ET_FLT  = mi_pkg::ET_FLT,
  parameter int unsigned AW      = mi_pkg::AW,
  parameter int unsigned HPE     = MBW / IBW,
  parameter int unsigned HS      = 1 << IBW,
  parameter int unsigned CW      = $clog2(ISS + 1),
  parameter int unsigned NWW     = $clog2(ISS / HPE + 1),
  parameter int unsigned ETW     = ET_INT + ET_FRAC,
  parameter int unsigned RW      = ET_FLT ? 32 : ETW     // result width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_i,
  input  logic                  load_ref_i,
  input  logic [AW-1:0]         ref_base_i,
  input  logic [AW-1:0]         flt_base_i,
  input  logic [NWW-1:0]        n_words_i,
  output logic                  busy_o,
  output logic                  done_o,
  output logic                  ref_cached_o,
  output logic [RW-1:0]         mi_o,
  output logic [RW-1:0]         h_ref_o,
  output logic [RW-1:0]         h_flt_o,
  output logic [RW-1:0]         h_joint_o,
  output logic                  mem_req_valid_o,
  output logic [AW-1:0]         mem_req_addr_o,
  input  logic                  mem_gnt_i,
  input  logic                  mem_rsp_valid_i,
  input  logic [MBW-1:0]        mem_rsp_data_i
);

  import mi_pkg::core_state_e;
  import mi_pkg::CORE_IDLE;
  import mi_pkg::CORE_PREFETCH;
  import mi_pkg::CORE_HIST;
  import mi_pkg::CORE_ENTROPY;
  import mi_pkg::CORE_CLEAR;

  core_state_e state;

  // ---------------- Stage 1 ----------------
  logic                    f_busy, f_start, f_prefetch;
  logic                    pix_valid, pix_last;
  logic [HPE-1:0][IBW-1:0] pix_ref, pix_flt;
  logic [NWW-1:0]          n_words_q;

  assign f_start    = (state == CORE_IDLE) && start_i;
  assign f_prefetch = (state == CORE_IDLE) && load_ref_i && CACHE && !start_i;

  input_fetch #(
    .IBW(IBW), .HPE(HPE), .MBW(MBW), .CACHE(CACHE),
    .CDEPTH(ISS / HPE), .AW(AW), .NWW(NWW)
  ) u_fetch (
    .clk, .rst_n,
    .start_i        (f_start),
    .prefetch_i     (f_prefetch),
    .ref_base_i, .flt_base_i, .n_words_i,
    .busy_o         (f_busy),
    .ref_cached_o,
    .mem_req_valid_o, .mem_req_addr_o, .mem_gnt_i,
    .mem_rsp_valid_i, .mem_rsp_data_i,
    .pix_valid_o    (pix_valid),
    .pix_ref_o      (pix_ref),
    .pix_flt_o      (pix_flt),
    .pix_last_o     (pix_last)
  );

  // ---------------- Stage 2 ----------------
  logic [HPE-1:0]                  pe_ready, pe_valid, pe_last;
  logic [HPE-1:0][EPE-1:0][CW-1:0] pe_cnt;

  for (genvar p = 0; p < HPE; p++) begin : g_pe
    joint_hist_pe #(.IBW(IBW), .EPE(EPE), .CW(CW)) u_pe (
      .clk, .rst_n,
      .in_valid_i (pix_valid),
      .ref_i      (pix_ref[p]),
      .flt_i      (pix_flt[p]),
      .in_last_i  (pix_last),
      .ready_o    (pe_ready[p]),
      .out_valid_o(pe_valid[p]),
      .out_cnt_o  (pe_cnt[p]),
      .out_last_o (pe_last[p])
    );
  end

  // ---------------- Stage 3 ----------------
  logic                   j_valid, j_last;
  logic [EPE-1:0][CW-1:0] j_cnt;

  joint_hist_sum #(.HPE(HPE), .EPE(EPE), .CW(CW)) u_sum (
    .clk, .rst_n,
    .in_valid_i (pe_valid),
    .in_cnt_i   (pe_cnt),
    .in_last_i  (pe_last),
    .out_valid_o(j_valid),
    .out_cnt_o  (j_cnt),
    .out_last_o (j_last)
  );

  // ---------------- Stages 4 and 5 ----------------
  // Branch 0: reference histogram, 1: floating histogram, 2: joint.
  logic [2:0]                  b_valid, b_last;
  logic [2:0][EPE-1:0][CW-1:0] b_cnt;

  ref_hist #(.HS(HS), .EPE(EPE), .CW(CW)) u_ref_hist (
    .clk, .rst_n,
    .in_valid_i (j_valid), .in_cnt_i(j_cnt), .in_last_i(j_last),
    .out_valid_o(b_valid[0]), .out_cnt_o(b_cnt[0]), .out_last_o(b_last[0])
  );

  flt_hist #(.HS(HS), .EPE(EPE), .CW(CW)) u_flt_hist (
    .clk, .rst_n,
    .in_valid_i (j_valid), .in_cnt_i(j_cnt), .in_last_i(j_last),
    .out_valid_o(b_valid[1]), .out_cnt_o(b_cnt[1]), .out_last_o(b_last[1])
  );

  assign b_valid[2] = j_valid;
  assign b_cnt[2]   = j_cnt;
  assign b_last[2]  = j_last;

  // ---------------- Stages 6 to 9 ----------------
  logic [2:0]         s_valid;
  logic [2:0][RW-1:0] s_sum;
  logic [CW-1:0]      n_pix;
  logic               mi_done;

  for (genvar b = 0; b < 3; b++) begin : g_branch
    logic [EPE-1:0]         t_valid, t_last;
    logic [EPE-1:0][RW-1:0] t_term;
    for (genvar e = 0; e < EPE; e++) begin : g_lane
      if (ET_FLT) begin : g_flt
        entropy_pe_flt #(.CW(CW), .ET_FRAC(ET_FRAC)) u_ent (
          .clk, .rst_n,
          .in_valid_i (b_valid[b]),
          .cnt_i      (b_cnt[b][e]),
          .in_last_i  (b_last[b]),
          .out_valid_o(t_valid[e]),
          .term_o     (t_term[e]),
          .out_last_o (t_last[e])
        );
      end else begin : g_fx
        entropy_pe #(.CW(CW), .ET_INT(ET_INT), .ET_FRAC(ET_FRAC)) u_ent (
          .clk, .rst_n,
          .in_valid_i (b_valid[b]),
          .cnt_i      (b_cnt[b][e]),
          .in_last_i  (b_last[b]),
          .out_valid_o(t_valid[e]),
          .term_o     (t_term[e]),
          .out_last_o (t_last[e])
        );
      end
    end
    // All lanes of a branch run in lockstep: lane 0 carries valid and last.
    if (ET_FLT) begin : g_sum_flt
      entropy_sum_flt #(.EPE(EPE)) u_esum (
        .clk, .rst_n,
        .in_valid_i (t_valid[0]),
        .term_i     (t_term),
        .in_last_i  (t_last[0]),
        .sum_valid_o(s_valid[b]),
        .sum_o      (s_sum[b])
      );
    end else begin : g_sum_fx
      entropy_sum #(.EPE(EPE), .ETW(ETW)) u_esum (
        .clk, .rst_n,
        .in_valid_i (t_valid[0]),
        .term_i     (t_term),
        .in_last_i  (t_last[0]),
        .sum_valid_o(s_valid[b]),
        .sum_o      (s_sum[b])
      );
    end
  end

  if (ET_FLT) begin : g_mi_flt
    mi_calc_flt #(.ET_FRAC(ET_FRAC), .NW(CW)) u_mi (
      .clk, .rst_n,
      .sr_valid_i(s_valid[0]), .sr_i(s_sum[0]),
      .sf_valid_i(s_valid[1]), .sf_i(s_sum[1]),
      .sj_valid_i(s_valid[2]), .sj_i(s_sum[2]),
      .n_i       (n_pix),
      .done_o    (mi_done),
      .mi_o, .h_ref_o, .h_flt_o, .h_joint_o
    );
  end else begin : g_mi_fx
    mi_calc #(.ET_INT(ET_INT), .ET_FRAC(ET_FRAC), .NW(CW)) u_mi (
      .clk, .rst_n,
      .sr_valid_i(s_valid[0]), .sr_i(s_sum[0]),
      .sf_valid_i(s_valid[1]), .sf_i(s_sum[1]),
      .sj_valid_i(s_valid[2]), .sj_i(s_sum[2]),
      .n_i       (n_pix),
      .done_o    (mi_done),
      .mi_o(mi_o), .h_ref_o(h_ref_o), .h_flt_o(h_flt_o), .h_joint_o(h_joint_o)
    );
  end

  // ---------------- Sequencer ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= CORE_CLEAR;
      n_words_q <= '0;
      n_pix     <= '0;
    end else begin
      case (state)
        CORE_CLEAR:    if (&pe_ready) state <= CORE_IDLE;
        CORE_IDLE: begin
          if (f_prefetch) begin
            n_words_q <= n_words_i;
            state     <= CORE_PREFETCH;
          end else if (f_start) begin
            if (!(CACHE && ref_cached_o)) n_words_q <= n_words_i;
            n_pix <= CW'((CACHE && ref_cached_o) ? n_words_q : n_words_i) * CW'(HPE);
            state <= CORE_HIST;
          end
        end
        CORE_PREFETCH: if (!f_busy) state <= CORE_IDLE;
        CORE_HIST:     if (!f_busy) state <= CORE_ENTROPY;
        CORE_ENTROPY:  if (mi_done) state <= CORE_IDLE;
        default:       state <= CORE_IDLE;
      endcase
    end
  end

  assign busy_o = (state != CORE_IDLE);
  assign done_o = mi_done;

endmodule
