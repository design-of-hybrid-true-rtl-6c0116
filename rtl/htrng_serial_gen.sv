// htrng_serial_gen: the serial bit generator, a seeded shift register with
// linear feedback. It is a Galois LFSR shifting right; the bit leaving at the
// low end is the serial output and, when it is 1, the feedback mask TAPS is
// XORed into the register. With the default 8-bit width and mask 8'hB8
// (x^8 + x^6 + x^5 + x^4 + 1) it runs through all 255 non-zero states before
// repeating.
//
// Interface: load copies seed into the register (a zero seed is replaced by
// 1, as an all-zero register would never leave zero); step advances one bit;
// ser_bit/ser_valid give the bit shifted out on each step.
// Timing: ser_valid is the step strobe delayed by one cycle.
//
// The shift-register generator, its seed and its cyclic sequence follow the
// original design; the polynomial and Galois form are this design's.
module htrng_serial_gen #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = 8'hB8,
  parameter logic [W-1:0] SEED = 8'h5A
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic         ser_bit,
  output logic         ser_valid,
  output logic [W-1:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SEED;
      ser_bit   <= 1'b0;
      ser_valid <= 1'b0;
    end else begin
      ser_valid <= 1'b0;
      if (load) begin
        state <= (seed == '0) ? W'(1) : seed;
      end else if (step) begin
        ser_bit   <= state[0];
        ser_valid <= 1'b1;
        state     <= (state >> 1) ^ (state[0] ? TAPS : '0);
      end
    end
  end

endmodule
