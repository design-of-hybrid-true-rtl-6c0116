// htrng_pkg: types and constants shared by the hybrid true random number
// generator (HTRNG). The byte width and FIFO depth are the design's own
// figures (bytes of 8 bits, a FIFO of 256 bytes held in one block RAM); the
// widths of the delay and sampling-divider settings are choices of this RTL.
package htrng_pkg;

  localparam int unsigned BYTE_W     = 8;    // random output is collected in bytes
  localparam int unsigned FIFO_DEPTH = 256;  // bytes buffered before the host link
  localparam int unsigned NSTAGES    = 3;    // delay stages d1, d2, d3 of the encoder ring
  localparam int unsigned DLY_W      = 4;    // width of one stage's delay setting
  localparam int unsigned DIV_W      = 8;    // width of the sampling-strobe divider setting

  // Source of the raw bit stream, chosen by the multiplexer.
  typedef enum logic {
    SRC_SAMPLED = 1'b0,  // encoder output after the two sampling flip-flops
    SRC_SERIAL  = 1'b1   // serial (shift-register) bit generator
  } src_sel_e;

  // One delay setting per encoder stage.
  typedef logic [DLY_W-1:0] dly_t;

endpackage
