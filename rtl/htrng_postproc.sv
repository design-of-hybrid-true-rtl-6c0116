// htrng_postproc: optional post-processing of the selected bit stream.
// With pp_en high it is an XOR corrector: bits are taken in pairs and one
// output bit, the XOR of the pair, is produced per pair. This halves the rate
// and reduces any bias of the raw stream. With pp_en low every input bit is
// passed on unchanged (the "sent to the FIFO without post-processing" path).
//
// Interface: bit_in/bit_valid in; bit_out/bit_out_valid out, one cycle after
// the input bit that completes an output. Changing pp_en, or clear (high
// while the generator is stopped), restarts pairing and drops a held bit.
// A post-processing unit that can be used or bypassed follows the original
// design, which does not say what the unit computes; the XOR-pair corrector
// is this design's choice.
module htrng_postproc (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic pp_en,
  input  logic bit_in,
  input  logic bit_valid,
  output logic bit_out,
  output logic bit_out_valid
);

  logic have_first;  // first bit of a pair is held
  logic first_bit;
  logic pp_en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first    <= 1'b0;
      first_bit     <= 1'b0;
      pp_en_q       <= 1'b0;
      bit_out       <= 1'b0;
      bit_out_valid <= 1'b0;
    end else begin
      pp_en_q       <= pp_en;
      bit_out_valid <= 1'b0;
      if (clear || pp_en != pp_en_q) begin
        have_first <= 1'b0;
      end else if (bit_valid) begin
        if (!pp_en) begin
          bit_out       <= bit_in;
          bit_out_valid <= 1'b1;
        end else if (!have_first) begin
          first_bit  <= bit_in;
          have_first <= 1'b1;
        end else begin
          bit_out       <= first_bit ^ bit_in;
          bit_out_valid <= 1'b1;
          have_first    <= 1'b0;
        end
      end
    end
  end

endmodule
