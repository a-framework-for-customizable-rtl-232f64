// Reference-histogram extraction (Stage 5, row reduction).
//
// The joint histogram arrives row-major, EPE counts per beat; row i holds
// the pairs whose reference intensity is i, so the reference histogram
// entry i is the sum of row i (HS/EPE beats). Row sums are collected EPE
// at a time and emitted as one packed beat, so the HS-entry histogram
// leaves as HS/EPE beats, the format the entropy lanes take.
//
// Timing: one input beat per cycle; an output beat follows the beat that
// completes its EPE-th row by one cycle. out_last_o marks the final beat.
module ref_hist #(
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
  localparam int unsigned LW  = (EPE > 1) ? $clog2(EPE) : 1;

  logic [BW-1:0]          beat;      // beat within the row
  logic [LW-1:0]          slot;      // row within the output beat
  logic [CW-1:0]          row_acc;
  logic [EPE-1:0][CW-1:0] pack;

  logic [CW-1:0] beat_sum, row_sum;
  always_comb begin
    beat_sum = '0;
    for (int e = 0; e < EPE; e++) beat_sum += in_cnt_i[e];
    row_sum = row_acc + beat_sum;
  end

  logic row_end, pack_end;
  assign row_end  = (BPR == 1) || (beat == BW'(BPR - 1));
  assign pack_end = (EPE == 1) || (slot == LW'(EPE - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat        <= '0;
      slot        <= '0;
      row_acc     <= '0;
      pack        <= '0;
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      out_cnt_o   <= '0;
    end else begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      if (in_valid_i) begin
        if (row_end) begin
          beat    <= '0;
          row_acc <= '0;
          pack[slot] <= row_sum;
          if (pack_end) begin
            slot        <= '0;
            out_valid_o <= 1'b1;
            out_last_o  <= in_last_i;
            for (int e = 0; e < EPE; e++)
              out_cnt_o[e] <= (LW'(e) == slot) ? row_sum : pack[e];
          end else begin
            slot <= slot + 1'b1;
          end
        end else begin
          beat    <= beat + 1'b1;
          row_acc <= row_sum;
        end
      end
    end
  end

endmodule
