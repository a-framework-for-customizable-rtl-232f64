// Mutual-information stage (Stage 9), single-precision floating-point type.
//
// Same job as mi_calc with IEEE 754 single operands: the three unscaled
// entropy sums S (floats, any arrival order) and the pixel count N give
//   H_x = log2(N) - S_x / N     for x in {ref, flt, joint}
//   MI  = (H_ref + H_flt) - H_joint
// S/N is divided exactly: the 24-bit significand of S, shifted left by 24,
// is divided by the integer N in a sequential restoring divider (one
// quotient bit per cycle, reused for the three sums), and the quotient with
// a sticky bit for the remainder is rounded once to nearest-even. log2(N)
// comes from a log2_fx instance with ET_FRAC fraction bits, converted to
// float. The additions round to nearest-even.
//
// Timing: after the last sum arrives the result follows in about
// (ET_FRAC + 2) + 3 * 49 cycles, flagged by a one-cycle done_o; outputs are
// IEEE singles in bits. The divider and the float logarithm source are this
// design's choices.
module mi_calc_flt #(
  parameter int unsigned ET_FRAC = mi_pkg::ET_FRAC,
  parameter int unsigned NW      = mi_pkg::CW          // pixel-count width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sr_valid_i,
  input  logic [31:0]   sr_i,
  input  logic          sf_valid_i,
  input  logic [31:0]   sf_i,
  input  logic          sj_valid_i,
  input  logic [31:0]   sj_i,
  input  logic [NW-1:0] n_i,
  output logic          done_o,
  output logic [31:0]   mi_o,
  output logic [31:0]   h_ref_o,
  output logic [31:0]   h_flt_o,
  output logic [31:0]   h_joint_o
);
  import fp32_pkg::*;

  localparam int unsigned PW = $clog2(NW);
  localparam int unsigned LW = PW + ET_FRAC;
  localparam int unsigned DW = 48;                 // dividend bits

  typedef enum logic [1:0] {S_COLLECT, S_LOG, S_DIV, S_OUT} state_e;
  state_e state;

  fp32_t [2:0]     s_q;       // sums: 0 ref, 1 flt, 2 joint
  logic  [2:0]     have;
  fp32_t [2:0]     q_q;       // S/N as floats
  fp32_t           log_n;
  logic  [1:0]     sel;
  logic  [5:0]     bit_cnt;
  logic  [DW-1:0]  dividend, quo;
  logic  [NW:0]    rem;

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
  assign rem_sh = {rem[NW-1:0], dividend[DW-1]};
  assign q_bit  = (rem_sh >= {1'b0, n_i});

  // Rounded quotient of the sum being divided.
  fp32_t cur_s, q_fp;
  assign cur_s = s_q[sel];
  assign q_fp  = (cur_s[30:23] == 8'd0) ? '0 :
                 fp_round(1'b0, int'(cur_s[30:23]) - 150 - 24 - 1,
                          64'({quo, rem != '0}));

  fp32_t h_r, h_f, h_j;
  assign h_r = fp_add(log_n, fp_neg(q_q[0]));
  assign h_f = fp_add(log_n, fp_neg(q_q[1]));
  assign h_j = fp_add(log_n, fp_neg(q_q[2]));

  function automatic logic [DW-1:0] sig_of(input fp32_t x);
    return {1'b1, x[22:0], 24'd0};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      have      <= '0;
      done_o    <= 1'b0;
      sel       <= '0;
      bit_cnt   <= '0;
      rem       <= '0;
      quo       <= '0;
      dividend  <= '0;
      s_q       <= '0;
      q_q       <= '0;
      log_n     <= '0;
      mi_o      <= '0;
      h_ref_o   <= '0;
      h_flt_o   <= '0;
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
            log_n    <= fp_from_fix(64'(lg), ET_FRAC);
            sel      <= 2'd0;
            dividend <= sig_of(s_q[0]);
            rem      <= '0;
            quo      <= '0;
            bit_cnt  <= '0;
            state    <= S_DIV;
          end
        end
        S_DIV: begin
          if (bit_cnt == 6'(DW)) begin
            q_q[sel] <= q_fp;
            if (sel == 2'd2) begin
              state <= S_OUT;
            end else begin
              sel      <= sel + 2'd1;
              dividend <= sig_of(s_q[sel + 2'd1]);
              rem      <= '0;
              quo      <= '0;
              bit_cnt  <= '0;
            end
          end else begin
            rem      <= q_bit ? rem_sh - {1'b0, n_i} : rem_sh;
            quo      <= {quo[DW-2:0], q_bit};
            dividend <= dividend << 1;
            bit_cnt  <= bit_cnt + 1'b1;
          end
        end
        S_OUT: begin
          h_ref_o   <= h_r;
          h_flt_o   <= h_f;
          h_joint_o <= h_j;
          mi_o      <= fp_add(fp_add(h_r, h_f), fp_neg(h_j));
          done_o    <= 1'b1;
          have      <= '0;
          state     <= S_COLLECT;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
