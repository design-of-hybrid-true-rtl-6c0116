// htrng_mux: source multiplexer of the HTRNG. It selects, bit by bit, either
// the sampled encoder bit or the serial generator bit and registers the
// choice. Both sources are stepped by the same sampling strobe, so their
// valid flags coincide; the output is valid whenever the selected source's
// flag is.
//
// Interface: sel (src_sel_e) chooses SRC_SAMPLED or SRC_SERIAL; the selected
// bit appears on bit_out with bit_valid one cycle later.
// Selecting between the two sources follows the original design; the
// output register is this design's choice.
module htrng_mux
  import htrng_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  src_sel_e sel,
  input  logic     samp_bit,
  input  logic     samp_valid,
  input  logic     ser_bit,
  input  logic     ser_valid,
  output logic     bit_out,
  output logic     bit_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else if (sel == SRC_SERIAL) begin
      bit_out   <= ser_bit;
      bit_valid <= ser_valid;
    end else begin
      bit_out   <= samp_bit;
      bit_valid <= samp_valid;
    end
  end

endmodule
