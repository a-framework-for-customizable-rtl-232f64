// Pipelined fixed-point base-2 logarithm of an unsigned integer.
//
// y = log2(x) with FRAC fraction bits; x = 0 gives y = 0, which is what the
// entropy terms need (0 * log 0 is taken as 0). The integer part is the
// position of the leading one. The operand is then normalised to a mantissa
// m in [1,2) and the fraction bits are produced one per pipeline stage by
// repeated squaring: if m*m >= 2 the next bit is 1 and m becomes m*m/2,
// otherwise the bit is 0 and m becomes m*m. The mantissa keeps GUARD extra
// fraction bits so that truncation in the squarings stays below one output
// LSB in practice.
//
// Interface: in_valid_i/x_i enter every cycle if wanted (fully pipelined,
// no stall); out_valid_o/y_o appear LAT = FRAC + 1 cycles later.
//
// The logarithm base and the algorithm are this design's choice: the
// published design uses a vendor HLS logarithm, which is not available here.
module log2_fx #(
  parameter int unsigned IW    = 19,               // operand width
  parameter int unsigned FRAC  = 19,               // result fraction bits
  parameter int unsigned GUARD = 4,
  parameter int unsigned PW    = $clog2(IW),       // result integer bits
  parameter int unsigned LW    = PW + FRAC         // result width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid_i,
  input  logic [IW-1:0] x_i,
  output logic          out_valid_o,
  output logic [LW-1:0] y_o
);

  localparam int unsigned MF = FRAC + GUARD;       // mantissa fraction bits

  logic            v_q [0:FRAC];
  logic            z_q [0:FRAC];
  logic [PW-1:0]   p_q [0:FRAC];
  logic [MF:0]     m_q [0:FRAC];
  logic [FRAC-1:0] b_q [0:FRAC];

  // Leading-one detection and normalisation (stage 0).
  logic [PW-1:0]   lead;
  logic [IW-1:0]   norm;
  always_comb begin
    lead = '0;
    for (int i = 0; i < IW; i++)
      if (x_i[i]) lead = PW'(i);
    norm = x_i << (PW'(IW - 1) - lead);
  end

  logic [MF:0] m0;
  generate
    if (MF + 1 >= IW) begin : g_ext
      assign m0 = {norm, {(MF + 1 - IW){1'b0}}};
    end else begin : g_cut
      assign m0 = norm[IW-1 -: MF + 1];
    end
  endgenerate

  always_ff @(posedge clk) begin
    if (!rst_n) v_q[0] <= 1'b0;
    else        v_q[0] <= in_valid_i;
    z_q[0] <= (x_i == '0);
    p_q[0] <= lead;
    m_q[0] <= m0;
    b_q[0] <= '0;
  end

  // One fraction bit per stage.
  for (genvar k = 1; k <= FRAC; k++) begin : g_sq
    logic [2*MF+1:0] sq;
    assign sq = m_q[k-1] * m_q[k-1];
    always_ff @(posedge clk) begin
      if (!rst_n) v_q[k] <= 1'b0;
      else        v_q[k] <= v_q[k-1];
      z_q[k] <= z_q[k-1];
      p_q[k] <= p_q[k-1];
      m_q[k] <= sq[2*MF+1] ? sq[2*MF+1 -: MF+1] : sq[2*MF -: MF+1];
      b_q[k] <= b_q[k-1];
      b_q[k][FRAC-k] <= sq[2*MF+1];
    end
  end

  assign out_valid_o = v_q[FRAC];
  assign y_o         = z_q[FRAC] ? '0 : {p_q[FRAC], b_q[FRAC]};

endmodule
