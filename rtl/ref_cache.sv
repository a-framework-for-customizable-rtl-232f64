// Reference-image cache.
//
// On-chip memory holding one whole reference image (DEPTH words of W bits,
// by default 512x512 8-bit pixels). The reference image does not change
// during a registration, so it is fetched once and then read from here
// while only the floating image is streamed from off-chip memory. Simple
// dual-port: one write port, one read port with one cycle of latency.
// Whether it maps to block RAM or UltraRAM is left to synthesis.
module ref_cache #(
  parameter int unsigned DEPTH = mi_pkg::ISS / mi_pkg::HPE,
  parameter int unsigned W     = mi_pkg::MBW,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic          re_i,
  input  logic [AW-1:0] raddr_i,
  output logic [W-1:0]  rdata_o
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
