// Shared constants and types of the mutual-information (MI) accelerator.
//
// The accelerator computes MI(X,Y) = H(X) + H(Y) - H(X,Y) of a reference and
// a floating image from their joint histogram. The constants below are the
// default configuration used as parameter defaults by every module: 8-bit
// pixels, a 32-bit memory port (four histogram PEs), four entropy lanes,
// 512x512 images, reference-image caching on, and a fixed-point entropy type
// with 23 integer and 19 fraction bits. Pixel width, port width, image size
// and the fixed-point split are the published configuration; four entropy
// lanes with caching (the "CFX-4-4" point) is this design's pick among the
// evaluated configurations. ET_FLT selects the other published entropy type,
// IEEE 754 single precision, instead of fixed point.
package mi_pkg;

  localparam int unsigned IBW     = 8;              // pixel width
  localparam int unsigned MBW     = 32;             // memory port width
  localparam int unsigned HPE     = MBW / IBW;      // histogram PEs
  localparam int unsigned EPE     = 4;              // entropy lanes
  localparam int unsigned ISS     = 512 * 512;      // max pixels per image
  localparam int unsigned HS      = 1 << IBW;       // single histogram size
  localparam bit          CACHE   = 1'b1;           // cache reference image
  localparam int unsigned ET_INT  = 23;             // entropy integer bits
  localparam int unsigned ET_FRAC = 19;             // entropy fraction bits
  localparam bit          ET_FLT  = 1'b0;           // 1: IEEE single entropy
  localparam int unsigned NCORE   = 1;              // parallel cores
  localparam int unsigned AW      = 32;             // word address width

  // Histogram count width: a count can reach the pixel count ISS.
  localparam int unsigned CW      = $clog2(ISS + 1);

  // State of one core's sequencer.
  typedef enum logic [2:0] {
    CORE_IDLE,      // waiting for a command
    CORE_PREFETCH,  // copying the reference image into the cache
    CORE_HIST,      // streaming pixel pairs into the histogram PEs
    CORE_ENTROPY,   // histograms draining through the entropy stages
    CORE_CLEAR      // histogram memories being zeroed after reset
  } core_state_e;

endpackage
