// htrng_sampler: the two D flip-flop stages that sample the encoder output.
// The first flip-flop takes the encoder output on every reference-clock edge;
// the second takes the first only on the sampling strobe, so the bit stream
// runs at the programmable sampling rate. Both data flip-flops are built
// without reset, as the design samples "irrespective of the reset"; only the
// valid flag is reset.
//
// Interface: din is the encoder output; tick is the sampling strobe;
// bit_out/bit_valid give one sampled bit per strobe.
// Timing: bit_valid is high in the cycle after a strobe; bit_out then holds
// the value din had in the cycle before the strobe (two flip-flops of delay).
module htrng_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic tick,
  output logic bit_out,
  output logic bit_valid
);

  logic ff1;

  // data flip-flops: no reset
  always_ff @(posedge clk) begin
    ff1 <= din;
    if (tick) bit_out <= ff1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bit_valid <= 1'b0;
    else        bit_valid <= tick;
  end

endmodule
