// Joint-histogram reduction (Stage 3).
//
// Adds the HPE partial joint histograms lane by lane into the complete
// joint histogram. The PEs receive the same number of pixel pairs and
// therefore drain in lockstep, so the beats of all inputs arrive in the
// same cycle and are summed as they come (an assertion checks this).
// One register stage: out_* follow in_* by one cycle, one beat per cycle.
// Counts keep their width CW: the sum of all partial counts is at most the
// number of pixels, which CW is sized for.
module joint_hist_sum #(
  parameter int unsigned HPE = mi_pkg::HPE,
  parameter int unsigned EPE = mi_pkg::EPE,
  parameter int unsigned CW  = mi_pkg::CW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [HPE-1:0]                  in_valid_i,
  input  logic [HPE-1:0][EPE-1:0][CW-1:0] in_cnt_i,
  input  logic [HPE-1:0]                  in_last_i,
  output logic                            out_valid_o,
  output logic [EPE-1:0][CW-1:0]          out_cnt_o,
  output logic                            out_last_o
);

  logic [EPE-1:0][CW-1:0] sum;
  always_comb begin
    for (int e = 0; e < EPE; e++) begin
      sum[e] = '0;
      for (int p = 0; p < HPE; p++) sum[e] += in_cnt_i[p][e];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      out_cnt_o   <= '0;
    end else begin
      out_valid_o <= &in_valid_i;
      out_last_o  <= (&in_valid_i) & in_last_i[0];
      out_cnt_o   <= sum;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (|in_valid_i) |-> (&in_valid_i))
    else $error("joint_hist_sum: partial histograms out of step");

endmodule
