// Mutual-information accelerator, top level.
//
// Computes the mutual information of a reference and a floating 8-bit
// image, the similarity metric an image-registration optimiser maximises,
// from their joint histogram. NCORE independent cores (mi_core) are
// instantiated side by side, each with its own memory read port, so that
// several registrations run in parallel without contending for a port.
// Every per-core signal is an array indexed by core.
//
// Per core: load_ref_i (pulse) prefetches the reference image into the
// on-chip cache; start_i (pulse) computes MI of the images at the given
// word addresses; done_o pulses when mi_o and the three entropies are
// valid. Results are in bits: two's-complement fixed point with ET_FRAC
// fraction bits, or IEEE 754 singles when ET_FLT = 1. See mi_core for the
// timing.
module mi_accel_top #(
  parameter int unsigned NCORE   = mi_pkg::NCORE,
  parameter int unsigned IBW     = mi_pkg::IBW,
  parameter int unsigned MBW     = mi_pkg::MBW,
  parameter int unsigned EPE     = mi_pkg::EPE,
  parameter int unsigned ISS     = mi_pkg::ISS,
  parameter bit          CACHE   = mi_pkg::CACHE,
  parameter int unsigned ET_INT  = mi_pkg::ET_INT,
  parameter int unsigned ET_FRAC = mi_pkg::ET_FRAC,
  parameter bit          ET_FLT  = mi_pkg::ET_FLT,
  parameter int unsigned AW      = mi_pkg::AW,
  parameter int unsigned HPE     = MBW / IBW,
  parameter int unsigned NWW     = $clog2(ISS / HPE + 1),
  parameter int unsigned ETW     = ET_INT + ET_FRAC,
  parameter int unsigned RW      = ET_FLT ? 32 : ETW
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NCORE-1:0]                   start_i,
  input  logic [NCORE-1:0]                   load_ref_i,
  input  logic [NCORE-1:0][AW-1:0]           ref_base_i,
  input  logic [NCORE-1:0][AW-1:0]           flt_base_i,
  input  logic [NCORE-1:0][NWW-1:0]          n_words_i,
  output logic [NCORE-1:0]                   busy_o,
  output logic [NCORE-1:0]                   done_o,
  output logic [NCORE-1:0]                   ref_cached_o,
  output logic [NCORE-1:0][RW-1:0]           mi_o,
  output logic [NCORE-1:0][RW-1:0]           h_ref_o,
  output logic [NCORE-1:0][RW-1:0]           h_flt_o,
  output logic [NCORE-1:0][RW-1:0]           h_joint_o,
  output logic [NCORE-1:0]                   mem_req_valid_o,
  output logic [NCORE-1:0][AW-1:0]           mem_req_addr_o,
  input  logic [NCORE-1:0]                   mem_gnt_i,
  input  logic [NCORE-1:0]                   mem_rsp_valid_i,
  input  logic [NCORE-1:0][MBW-1:0]          mem_rsp_data_i
);

  for (genvar c = 0; c < NCORE; c++) begin : g_core
    mi_core #(
      .IBW(IBW), .MBW(MBW), .EPE(EPE), .ISS(ISS), .CACHE(CACHE),
      .ET_INT(ET_INT), .ET_FRAC(ET_FRAC), .ET_FLT(ET_FLT), .AW(AW)
    ) u_core (
      .clk, .rst_n,
      .start_i        (start_i[c]),
      .load_ref_i     (load_ref_i[c]),
      .ref_base_i     (ref_base_i[c]),
      .flt_base_i     (flt_base_i[c]),
      .n_words_i      (n_words_i[c]),
      .busy_o         (busy_o[c]),
      .done_o         (done_o[c]),
      .ref_cached_o   (ref_cached_o[c]),
      .mi_o           (mi_o[c]),
      .h_ref_o        (h_ref_o[c]),
      .h_flt_o        (h_flt_o[c]),
      .h_joint_o      (h_joint_o[c]),
      .mem_req_valid_o(mem_req_valid_o[c]),
      .mem_req_addr_o (mem_req_addr_o[c]),
      .mem_gnt_i      (mem_gnt_i[c]),
      .mem_rsp_valid_i(mem_rsp_valid_i[c]),
      .mem_rsp_data_i (mem_rsp_data_i[c])
    );
  end

endmodule
