// Floating-histogram extraction (Stage 5, column reduction).
//
// The joint histogram arrives row-major, EPE counts per beat; column j
// holds the pairs whose floating intensity is j, so the floating histogram
// entry j is the sum of column j over all HS rows. Beat b of every row
// covers columns b*EPE .. b*EPE+EPE-1, so an array of HS/EPE packed
// accumulators is updated in place. During the last row each accumulator is
// added to its final beat and sent out instead of being stored, and is
// cleared for the next histogram.
//
// Timing: one input beat per cycle; the HS/EPE output beats follow the
// beats of the last row by one cycle. out_last_o marks the final beat.
module flt_hist #(
  parameter int unsigned HS  = mi_pkg::HS,
  parameter int unsigned EPE = mi_pkg::EPE,
  parameter int unsigned CW  = mi_pkg::CW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid_i,
  input  logic [EPE-1:0][CW-1:0] in_cnt_i,
  input  logic                   in_last_i,
  output logic                   out_valid_o,
  output logic [EPE-1:0][CW-1:0] out_cnt_o,
  output logic                   out_last_o
);

  localparam int unsigned BPR = HS / EPE;              // beats per row
  localparam int unsigned BW  = (BPR > 1) ? $clog2(BPR) : 1;
  localparam int unsigned RW  = $clog2(HS);

  logic [EPE-1:0][CW-1:0] col_acc [BPR];
  logic [BW-1:0]          beat;
  logic [RW-1:0]          row;

  logic [EPE-1:0][CW-1:0] upd;
  always_comb
    for (int e = 0; e < EPE; e++) upd[e] = col_acc[beat][e] + in_cnt_i[e];

  logic last_row, row_end;
  assign last_row = (row == RW'(HS - 1));
  assign row_end  = (BPR == 1) || (beat == BW'(BPR - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat        <= '0;
      row         <= '0;
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      out_cnt_o   <= '0;
      for (int b = 0; b < BPR; b++) col_acc[b] <= '0;
    end else begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      if (in_valid_i) begin
        beat <= row_end ? '0 : beat + 1'b1;
        if (row_end) row <= row + 1'b1;
        if (last_row) begin
          col_acc[beat] <= '0;
          out_valid_o   <= 1'b1;
          out_cnt_o     <= upd;
          out_last_o    <= in_last_i;
        end else begin
          col_acc[beat] <= upd;
        end
      end
    end
  end

endmodule
