// Entropy accumulator (Stage 8).
//
// Adds the EPE lane terms of each beat (EPE-1 additions) and accumulates
// the beats of one histogram. On the beat flagged last it emits the total
// on sum_o with a one-cycle sum_valid_o pulse in the next cycle and starts
// over from zero. Accepts one beat per cycle; the result is unsigned
// fixed point in the entropy format (sum of c*log2 c).
module entropy_sum #(
  parameter int unsigned EPE = mi_pkg::EPE,
  parameter int unsigned ETW = mi_pkg::ET_INT + mi_pkg::ET_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid_i,
  input  logic [EPE-1:0][ETW-1:0] term_i,
  input  logic                    in_last_i,
  output logic                    sum_valid_o,
  output logic [ETW-1:0]          sum_o
);

  logic [ETW-1:0] beat_sum, acc;

  always_comb begin
    beat_sum = '0;
    for (int i = 0; i < EPE; i++) beat_sum += term_i[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc         <= '0;
      sum_valid_o <= 1'b0;
      sum_o       <= '0;
    end else begin
      sum_valid_o <= 1'b0;
      if (in_valid_i) begin
        if (in_last_i) begin
          sum_o       <= acc + beat_sum;
          sum_valid_o <= 1'b1;
          acc         <= '0;
        end else begin
          acc <= acc + beat_sum;
        end
      end
    end
  end

endmodule
