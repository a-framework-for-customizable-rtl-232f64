// Entropy accumulator (Stage 8), single-precision floating-point type.
//
// Adds the EPE lane terms of each beat (EPE-1 floating-point additions, in
// lane order) and accumulates the beats of one histogram with a further
// addition, every operation rounded to nearest-even. On the beat flagged
// last it emits the total on sum_o with a one-cycle sum_valid_o pulse in
// the next cycle and starts over from zero. One beat per cycle; the adders
// are combinational, so the accumulation loop closes in one cycle.
module entropy_sum_flt #(
  parameter int unsigned EPE = mi_pkg::EPE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  input  logic [EPE-1:0][31:0] term_i,
  input  logic                 in_last_i,
  output logic                 sum_valid_o,
  output logic [31:0]          sum_o
);
  import fp32_pkg::*;

  fp32_t beat_sum, acc, total;

  always_comb begin
    beat_sum = term_i[0];
    for (int i = 1; i < EPE; i++) beat_sum = fp_add(beat_sum, term_i[i]);
    total = fp_add(acc, beat_sum);
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
          sum_o       <= total;
          sum_valid_o <= 1'b1;
          acc         <= '0;
        end else begin
          acc <= total;
        end
      end
    end
  end

endmodule
