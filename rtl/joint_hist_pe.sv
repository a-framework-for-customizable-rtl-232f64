// Joint-histogram processing element (Stage 2).
//
// Builds the joint histogram of a stream of (reference, floating) pixel
// pairs in a local memory of HS*HS counts, HS = 2^IBW. The joint index is
// {ref, flt}: the reference intensity selects the row, the floating one the
// column. To avoid the read-after-write hazard of a read-modify-write per
// pixel, the count of the most recent index ("old") lives in an accumulator
// register: while the incoming index equals old the register is bumped;
// when it differs the register is written back to hist[old] and reloaded
// with hist[curr] + 1. This is the scheme of the published PE; the memory
// read here is synchronous, so an index is compared one cycle after its
// read was issued, and a write-back to the very address being read in the
// same cycle is forwarded to the reader (the bypass).
//
// The memory is organised as HS*HS/EPE rows of EPE counts so that the
// read-out produces EPE consecutive counts per beat. After the pair flagged
// in_last_i the accumulator is flushed and the histogram is streamed out in
// row-major order, one row per cycle, and each row is zeroed as it is read.
// After reset the memory is zeroed once (HS*HS/EPE cycles). ready_o is high
// when the PE can take a new image.
//
// Timing: one pair per cycle, no stall; read-out starts 3 cycles after the
// last pair and lasts HS*HS/EPE cycles. The output has no backpressure: all
// consumers take one beat per cycle. Clearing policy, bypass and memory
// organisation are this design's choices.
module joint_hist_pe #(
  parameter int unsigned IBW = mi_pkg::IBW,
  parameter int unsigned EPE = mi_pkg::EPE,
  parameter int unsigned CW  = mi_pkg::CW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid_i,
  input  logic [IBW-1:0]         ref_i,
  input  logic [IBW-1:0]         flt_i,
  input  logic                   in_last_i,
  output logic                   ready_o,
  output logic                   out_valid_o,
  output logic [EPE-1:0][CW-1:0] out_cnt_o,
  output logic                   out_last_o
);

  localparam int unsigned XW    = 2 * IBW;                 // joint index
  localparam int unsigned LB    = $clog2(EPE);             // lane bits
  localparam int unsigned DEPTH = (1 << XW) / EPE;         // rows
  localparam int unsigned RW    = (XW > LB) ? XW - LB : 1; // row address

  typedef enum logic [1:0] {P_CLEAR, P_ACC, P_FLUSH, P_DRAIN} pstate_e;
  pstate_e state;

  logic [EPE-1:0][CW-1:0] mem [DEPTH];
  logic [EPE-1:0][CW-1:0] rdata;

  function automatic logic [RW-1:0] row_of(input logic [XW-1:0] x);
    return RW'(x >> LB);
  endfunction
  function automatic int unsigned lane_of(input logic [XW-1:0] x);
    return (EPE == 1) ? 0 : int'(x) % EPE;
  endfunction

  // Stage s1: pair whose memory word is being returned.
  logic          s1_valid, s1_last;
  logic [XW-1:0] s1_idx;
  logic [XW-1:0] old_idx;
  logic          old_valid;
  logic [CW-1:0] acc;
  logic          byp;
  logic [CW-1:0] byp_data;
  logic [RW-1:0] cnt;           // clear / drain row counter

  logic [XW-1:0] in_idx;
  assign in_idx = {ref_i, flt_i};

  // Write-port control.
  logic          wb_en;         // accumulator write-back (one lane)
  logic [XW-1:0] wb_idx;
  logic [CW-1:0] wb_data;
  logic          hit;           // s1 index equals the cached one
  logic [CW-1:0] mem_val;

  assign hit     = old_valid && (s1_idx == old_idx);
  assign mem_val = byp ? byp_data : rdata[lane_of(s1_idx)];

  always_comb begin
    wb_en   = 1'b0;
    wb_idx  = old_idx;
    wb_data = acc;
    if (state == P_ACC && s1_valid && !hit && old_valid) wb_en = 1'b1;
    if (state == P_FLUSH && old_valid)                   wb_en = 1'b1;
  end

  logic          rd_en;
  logic [RW-1:0] rd_row;
  logic          row_clr;
  always_comb begin
    rd_en   = 1'b0;
    rd_row  = row_of(in_idx);
    row_clr = 1'b0;
    if (state == P_ACC && in_valid_i) rd_en = 1'b1;
    if (state == P_DRAIN) begin
      rd_en   = 1'b1;
      rd_row  = cnt;
      row_clr = 1'b1;
    end
    if (state == P_CLEAR) begin
      rd_row  = cnt;
      row_clr = 1'b1;
    end
  end

  // Histogram memory: synchronous read, lane-enable write, row clear.
  always_ff @(posedge clk) begin
    if (rd_en) rdata <= mem[rd_row];
    if (row_clr)    mem[rd_row] <= '0;
    else if (wb_en) mem[row_of(wb_idx)][lane_of(wb_idx)] <= wb_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= P_CLEAR;
      cnt         <= '0;
      s1_valid    <= 1'b0;
      s1_last     <= 1'b0;
      s1_idx      <= '0;
      old_valid   <= 1'b0;
      old_idx     <= '0;
      acc         <= '0;
      byp         <= 1'b0;
      byp_data    <= '0;
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      s1_valid    <= 1'b0;
      case (state)
        P_CLEAR: begin
          cnt <= cnt + 1'b1;
          if (cnt == RW'(DEPTH - 1)) begin
            cnt   <= '0;
            state <= P_ACC;
          end
        end
        P_ACC: begin
          s1_valid <= in_valid_i;
          s1_last  <= in_last_i;
          s1_idx   <= in_idx;
          byp      <= wb_en && (wb_idx == in_idx);
          byp_data <= wb_data;
          if (s1_valid) begin
            if (hit) begin
              acc <= acc + 1'b1;
            end else begin
              acc       <= mem_val + 1'b1;
              old_idx   <= s1_idx;
              old_valid <= 1'b1;
            end
            if (s1_last) state <= P_FLUSH;
          end
        end
        P_FLUSH: begin
          old_valid <= 1'b0;
          cnt       <= '0;
          state     <= P_DRAIN;
        end
        P_DRAIN: begin
          out_valid_o <= 1'b1;
          out_last_o  <= (cnt == RW'(DEPTH - 1));
          cnt         <= cnt + 1'b1;
          if (cnt == RW'(DEPTH - 1)) begin
            cnt   <= '0;
            state <= P_ACC;
          end
        end
        default: state <= P_CLEAR;
      endcase
    end
  end

  assign out_cnt_o = rdata;
  assign ready_o   = (state == P_ACC) && !s1_valid;

  // A new pair must not arrive while the histogram is being flushed,
  // drained or cleared.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid_i |-> state == P_ACC)
    else $error("joint_hist_pe: pixel pair outside accumulation");

endmodule
