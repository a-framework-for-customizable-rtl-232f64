// Entropy lane (Stage 7), single-precision floating-point type.
//
// Same job as entropy_pe, c -> c * log2(c), but the term is an IEEE 754
// single: the count is converted to float (exact, counts stay below 2^24),
// log2(c) from the log2_fx pipeline is converted to float, and the two are
// multiplied with one rounding. Scaling by the pixel count is deferred to
// Stage 9 as in the fixed-point lanes.
//
// Interface: one count per cycle, no stall; out_* follow in_* by
// LAT = ET_FRAC + 2 cycles. The floating-point type follows the published
// design; deriving the float logarithm from the fixed-point log2 pipeline
// (ET_FRAC fraction bits) is this design's choice.
module entropy_pe_flt #(
  parameter int unsigned CW      = mi_pkg::CW,
  parameter int unsigned ET_FRAC = mi_pkg::ET_FRAC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid_i,
  input  logic [CW-1:0] cnt_i,
  input  logic          in_last_i,
  output logic          out_valid_o,
  output logic [31:0]   term_o,
  output logic          out_last_o
);
  import fp32_pkg::*;

  localparam int unsigned LOG_LAT = ET_FRAC + 1;
  localparam int unsigned PW      = $clog2(CW);
  localparam int unsigned LW      = PW + ET_FRAC;

  logic          lg_valid;
  logic [LW-1:0] lg;

  log2_fx #(.IW(CW), .FRAC(ET_FRAC)) u_log (
    .clk, .rst_n,
    .in_valid_i (in_valid_i),
    .x_i        (cnt_i),
    .out_valid_o(lg_valid),
    .y_o        (lg)
  );

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

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
    end else begin
      out_valid_o <= lg_valid;
      out_last_o  <= lg_valid & l_dly[LOG_LAT-1];
    end
    term_o <= fp_mul(fp_from_fix(64'(c_dly[LOG_LAT-1]), 0), fp_from_fix(64'(lg), ET_FRAC));
  end

endmodule
