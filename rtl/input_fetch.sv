// Input fetch and data split (Stage 1).
//
// Reads the reference and floating images over a single memory read port
// and hands HPE pixel pairs per cycle to the histogram PEs; pixel k of a
// memory word sits in bits [IBW*k +: IBW].
//
//  * Direct mode: requests alternate reference word i, floating word i.
//    Responses return in request order, so each reference word is held
//    until its floating partner arrives; at most one word pair every two
//    cycles, the port being shared by both images.
//  * Cached mode (CACHE = 1): prefetch_i copies the reference image into the
//    on-chip ref_cache once. Every later start_i then streams only the
//    floating image, reading the matching reference word from the cache,
//    up to one word pair per cycle. Direct mode is used while no reference
//    is cached.
//
// Memory port: mem_req_valid_o/mem_req_addr_o (word address) are held
// until mem_gnt_i; read data returns in order on mem_rsp_valid_i /
// mem_rsp_data_i without backpressure. The pair stream has no backpressure
// either: the histogram PEs take a pair every cycle. pix_last_o marks the
// final pair of an image. The two modes follow the published fetch
// scheme; the port protocol and word order are this design's choices.
module input_fetch #(
  parameter int unsigned IBW    = mi_pkg::IBW,
  parameter int unsigned HPE    = mi_pkg::HPE,
  parameter int unsigned MBW    = IBW * HPE,
  parameter bit          CACHE  = mi_pkg::CACHE,
  parameter int unsigned CDEPTH = mi_pkg::ISS / HPE,   // max image words
  parameter int unsigned AW     = mi_pkg::AW,
  parameter int unsigned NWW    = $clog2(CDEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // commands (pulses, accepted while idle)
  input  logic                    start_i,
  input  logic                    prefetch_i,
  input  logic [AW-1:0]           ref_base_i,
  input  logic [AW-1:0]           flt_base_i,
  input  logic [NWW-1:0]          n_words_i,
  output logic                    busy_o,
  output logic                    ref_cached_o,
  // memory read port
  output logic                    mem_req_valid_o,
  output logic [AW-1:0]           mem_req_addr_o,
  input  logic                    mem_gnt_i,
  input  logic                    mem_rsp_valid_i,
  input  logic [MBW-1:0]          mem_rsp_data_i,
  // pixel-pair stream
  output logic                    pix_valid_o,
  output logic [HPE-1:0][IBW-1:0] pix_ref_o,
  output logic [HPE-1:0][IBW-1:0] pix_flt_o,
  output logic                    pix_last_o
);

  localparam int unsigned CAW = (CDEPTH > 1) ? $clog2(CDEPTH) : 1;

  typedef enum logic [1:0] {F_IDLE, F_PREFETCH, F_DIRECT, F_CACHED} fstate_e;
  fstate_e state;

  logic [NWW:0]   n_req;        // requests to issue in this command
  logic [NWW:0]   req_cnt, rsp_cnt;
  logic [NWW-1:0] n_words;
  logic [AW-1:0]  ref_base, flt_base;
  logic [MBW-1:0] ref_hold, flt_q;
  logic           out_v, out_last;

  // Request address for the current command.
  always_comb begin
    unique case (state)
      F_PREFETCH: mem_req_addr_o = ref_base + AW'(req_cnt);
      F_CACHED:   mem_req_addr_o = flt_base + AW'(req_cnt);
      default:    mem_req_addr_o = (req_cnt[0] ? flt_base : ref_base)
                                   + AW'(req_cnt >> 1);
    endcase
  end
  assign mem_req_valid_o = (state != F_IDLE) && (req_cnt != n_req);
  assign busy_o          = (state != F_IDLE) || out_v;

  // Which responses carry what.
  logic rsp_is_flt, rsp_final, cache_we, cache_re;
  assign rsp_is_flt = (state == F_CACHED) || (state == F_DIRECT && rsp_cnt[0]);
  assign rsp_final  = (rsp_cnt + 1'b1) == n_req;
  assign cache_we   = CACHE && state == F_PREFETCH && mem_rsp_valid_i;
  assign cache_re   = CACHE && state == F_CACHED && mem_rsp_valid_i;

  logic [MBW-1:0] cache_rdata;
  logic           from_cache;

  generate
    if (CACHE) begin : g_cache
      ref_cache #(.DEPTH(CDEPTH), .W(MBW)) u_cache (
        .clk,
        .we_i   (cache_we),
        .waddr_i(CAW'(rsp_cnt)),
        .wdata_i(mem_rsp_data_i),
        .re_i   (cache_re),
        .raddr_i(CAW'(rsp_cnt)),
        .rdata_o(cache_rdata)
      );
    end else begin : g_nocache
      assign cache_rdata = '0;
    end
  endgenerate

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= F_IDLE;
      req_cnt      <= '0;
      rsp_cnt      <= '0;
      n_req        <= '0;
      n_words      <= '0;
      ref_base     <= '0;
      flt_base     <= '0;
      ref_cached_o <= 1'b0;
      ref_hold     <= '0;
      flt_q        <= '0;
      out_v        <= 1'b0;
      out_last     <= 1'b0;
      from_cache   <= 1'b0;
    end else begin
      out_v    <= 1'b0;
      out_last <= 1'b0;
      case (state)
        F_IDLE: begin
          req_cnt <= '0;
          rsp_cnt <= '0;
          if (prefetch_i && CACHE) begin
            ref_base     <= ref_base_i;
            n_words      <= n_words_i;
            n_req        <= {1'b0, n_words_i};
            ref_cached_o <= 1'b0;
            state        <= F_PREFETCH;
          end else if (start_i) begin
            ref_base <= ref_base_i;
            flt_base <= flt_base_i;
            if (CACHE && ref_cached_o) begin
              n_req      <= {1'b0, n_words};
              from_cache <= 1'b1;
              state      <= F_CACHED;
            end else begin
              n_words    <= n_words_i;
              n_req      <= {n_words_i, 1'b0};
              from_cache <= 1'b0;
              state      <= F_DIRECT;
            end
          end
        end
        default: begin
          if (mem_req_valid_o && mem_gnt_i) req_cnt <= req_cnt + 1'b1;
          if (mem_rsp_valid_i) begin
            rsp_cnt <= rsp_cnt + 1'b1;
            if (rsp_is_flt) begin
              flt_q    <= mem_rsp_data_i;
              out_v    <= 1'b1;
              out_last <= rsp_final;
            end else if (state == F_DIRECT) begin
              ref_hold <= mem_rsp_data_i;
            end
            if (rsp_final) begin
              state <= F_IDLE;
              if (state == F_PREFETCH) ref_cached_o <= 1'b1;
            end
          end
        end
      endcase
    end
  end

  // Data split: unpack the word pair into HPE pixel pairs.
  assign pix_valid_o = out_v;
  assign pix_last_o  = out_last;
  always_comb
    for (int k = 0; k < HPE; k++) begin
      pix_flt_o[k] = flt_q[IBW*k +: IBW];
      pix_ref_o[k] = from_cache ? cache_rdata[IBW*k +: IBW] : ref_hold[IBW*k +: IBW];
    end

  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_rsp_valid_i |-> state != F_IDLE)
    else $error("input_fetch: unexpected memory response");

endmodule
