// Entropy lane (Stage 7): c -> c * log2(c) in fixed point.
//
// For a histogram over N pixels, H = -sum (c/N) log2(c/N)
//                                  = log2(N) - (1/N) * sum c*log2(c).
// As in the published architecture, scaling by the pixel count is deferred
// to the last stage, so a lane only forms the unscaled term c*log2(c). The
// term has ET_INT integer and ET_FRAC fraction bits; with counts up to
// 2^18 the largest sum, 2^18 * 18, still fits 23 integer bits.
//
// Interface: one count per cycle, no stall; out_* follow in_* by
// LAT = ET_FRAC + 2 cycles (log2 pipeline plus the product register).
// This is the fixed-point entropy type; entropy_pe_flt is the
// single-precision one. The base-2 logarithm is this design's choice.
module entropy_pe #(
  parameter int unsigned CW      = mi_pkg::CW,
  parameter int unsigned ET_INT  = mi_pkg::ET_INT,
  parameter int unsigned ET_FRAC = mi_pkg::ET_FRAC,
  parameter int unsigned ETW     = ET_INT + ET_FRAC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid_i,
  input  logic [CW-1:0]  cnt_i,
  input  logic           in_last_i,
  output logic           out_valid_o,
  output logic [ETW-1:0] term_o,
  output logic           out_last_o
);

  localparam int unsigned LOG_LAT = ET_FRAC + 1;
  localparam int unsigned PW      = $clog2(CW);
  localparam int unsigned LW      = PW + ET_FRAC;
  localparam int unsigned PRW     = CW + LW;

  logic          lg_valid;
  logic [LW-1:0] lg;

  log2_fx #(.IW(CW), .FRAC(ET_FRAC)) u_log (
    .clk, .rst_n,
    .in_valid_i (in_valid_i),
    .x_i        (cnt_i),
    .out_valid_o(lg_valid),
    .y_o        (lg)
  );

  // Count and last flag travel beside the logarithm.
  logic [CW-1:0] c_dly [0:LOG_LAT-1];
  logic          l_dly [0:LOG_LAT-1];
  always_ff @(posedge clk) begin
    c_dly[0] <= cnt_i;
    l_dly[0] <= in_last_i & in_valid_i;
    for (int i = 1; i < LOG_LAT; i++) begin
      c_dly[i] <= c_dly[i-1];
      l_dly[i] <= l_dly[i-1];
    end
  end

  logic [PRW-1:0] prod;
  assign prod = PRW'(c_dly[LOG_LAT-1]) * PRW'(lg);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
    end else begin
      out_valid_o <= lg_valid;
      out_last_o  <= lg_valid & l_dly[LOG_LAT-1];
    end
    term_o <= ETW'(prod);
  end

endmodule
