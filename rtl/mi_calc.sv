// Mutual-information stage (Stage 9).
//
// Receives the three unscaled entropy sums S = sum c*log2(c) of the
// reference, floating and joint histograms (each may arrive in any cycle,
// flagged by its valid pulse) and the pixel count N. It forms
//   H_x = log2(N) - S_x / N     for x in {ref, flt, joint}
//   MI  = H_ref + H_flt - H_joint
// The division by N, which the lanes defer, is done here by one sequential
// restoring divider (one quotient bit per cycle, reused for the three
// sums); log2(N) comes from a log2_fx instance. The final combination is
// one addition and one subtraction, as in the published stage.
//
// Timing: after the last of the three sums arrives the result follows in
// about (ET_FRAC + 2) + 3 * (ETW + 1) cycles, flagged by a one-cycle done_o.
// All values are two's-complement fixed point with ET_FRAC fraction bits,
// in bits (base-2 logarithm, this design's choice).
module mi_calc #(
  parameter int unsigned ET_INT  = mi_pkg::ET_INT,
  parameter int unsigned ET_FRAC = mi_pkg::ET_FRAC,
  parameter int unsigned ETW     = ET_INT + ET_FRAC,
  parameter int unsigned NW      = mi_pkg::CW          // pixel-count width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sr_valid_i,
  input  logic [ETW-1:0]        sr_i,
  input  logic                  sf_valid_i,
  input  logic [ETW-1:0]        sf_i,
  input  logic                  sj_valid_i,
  input  logic [ETW-1:0]        sj_i,
  input  logic [NW-1:0]         n_i,
  output logic                  done_o,
  output logic signed [ETW-1:0] mi_o,
  output logic signed [ETW-1:0] h_ref_o,
  output logic signed [ETW-1:0] h_flt_o,
  output logic signed [ETW-1:0] h_joint_o
);

  localparam int unsigned PW  = $clog2(NW);
  localparam int unsigned LW  = PW + ET_FRAC;
  localparam int unsigned BCW = $clog2(ETW + 1);

  typedef enum logic [1:0] {S_COLLECT, S_LOG, S_DIV, S_OUT} state_e;
  state_e state;

  logic [2:0][ETW-1:0] s_q;       // sums: 0 ref, 1 flt, 2 joint
  logic [2:0]          have;
  logic [2:0][ETW-1:0] q_q;       // quotients S/N
  logic [LW-1:0]       log_n;
  logic [1:0]          sel;       // which sum is being divided
  logic [BCW-1:0]      bit_cnt;
  logic [ETW-1:0]      dividend;
  logic [NW:0]         rem;
  logic [ETW-1:0]      quo;

  logic          lg_start, lg_valid;
  logic [LW-1:0] lg;

  log2_fx #(.IW(NW), .FRAC(ET_FRAC)) u_log (
    .clk, .rst_n,
    .in_valid_i (lg_start),
    .x_i        (n_i),
    .out_valid_o(lg_valid),
    .y_o        (lg)
  );

  assign lg_start = (state == S_COLLECT) && (&(have | {sj_valid_i, sf_valid_i, sr_valid_i}));

  // One restoring-division step.
  logic [NW:0] rem_sh;
  logic        q_bit;
  assign rem_sh = {rem[NW-1:0], dividend[ETW-1]};
  assign q_bit  = (rem_sh >= {1'b0, n_i});

  logic signed [ETW-1:0] h_r, h_f, h_j;
  assign h_r = $signed(ETW'(log_n)) - $signed(q_q[0]);
  assign h_f = $signed(ETW'(log_n)) - $signed(q_q[1]);
  assign h_j = $signed(ETW'(log_n)) - $signed(q_q[2]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_COLLECT;
      have   <= '0;
      done_o <= 1'b0;
      sel    <= '0;
      bit_cnt <= '0;
      rem    <= '0;
      quo    <= '0;
      dividend <= '0;
      s_q    <= '0;
      q_q    <= '0;
      log_n  <= '0;
      mi_o   <= '0;
      h_ref_o <= '0;
      h_flt_o <= '0;
      h_joint_o <= '0;
    end else begin
      done_o <= 1'b0;
      case (state)
        S_COLLECT: begin
          if (sr_valid_i) begin s_q[0] <= sr_i; have[0] <= 1'b1; end
          if (sf_valid_i) begin s_q[1] <= sf_i; have[1] <= 1'b1; end
          if (sj_valid_i) begin s_q[2] <= sj_i; have[2] <= 1'b1; end
          if (lg_start) state <= S_LOG;
        end
        S_LOG: begin
          if (lg_valid) begin
            log_n    <= lg;
            sel      <= 2'd0;
            dividend <= s_q[0];
            rem      <= '0;
            quo      <= '0;
            bit_cnt  <= '0;
            state    <= S_DIV;
          end
        end
        S_DIV: begin
          if (bit_cnt == BCW'(ETW)) begin
            q_q[sel] <= quo;
            if (sel == 2'd2) begin
              state <= S_OUT;
            end else begin
              sel      <= sel + 2'd1;
              dividend <= s_q[sel + 2'd1];
              rem      <= '0;
              quo      <= '0;
              bit_cnt  <= '0;
            end
          end else begin
            rem      <= q_bit ? rem_sh - {1'b0, n_i} : rem_sh;
            quo      <= {quo[ETW-2:0], q_bit};
            dividend <= dividend << 1;
            bit_cnt  <= bit_cnt + 1'b1;
          end
        end
        S_OUT: begin
          h_ref_o   <= h_r;
          h_flt_o   <= h_f;
          h_joint_o <= h_j;
          mi_o      <= h_r + h_f - h_j;
          done_o    <= 1'b1;
          have      <= '0;
          state     <= S_COLLECT;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
