// htrng_encoder: the "encoding logic" that stands in for the ring oscillator
// of a conventional TRNG. A ring of three inverting stages (d1, d2, d3) is
// built from flip-flops; each stage takes on the inverse of the stage before
// it only after its own programmable delay, so the ring oscillates with a
// period of 2 * sum(dly[i] + 1) clock cycles without any combinational loop.
//
// Interface: en starts the ring (while low the ring is held in its rest
// state 3'b010, the single-edge state of a three-inverter ring, and delay
// counters are cleared); dly[i] sets the extra cycles stage i waits before it
// switches; stage is the 3-bit ring state and ro_out (= stage d3) is the
// oscillator-like output fed to the sampler.
// Timing: stage d1 leaves the rest state dly[0]+1 cycles after en rises.
//
// Three delays d1..d3 replacing the inverters, under an enable pin, follow
// the original design; the per-stage cycle counters, the rest state and the
// period formula are this design's choices.
module htrng_encoder
  import htrng_pkg::*;
#(
  parameter int unsigned N_STG = NSTAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  dly_t             dly    [N_STG],
  output logic [N_STG-1:0] stage,
  output logic             ro_out
);

  // rest state: only stage 0 differs from its target, one edge in the ring
  localparam logic [N_STG-1:0] REST = N_STG'(2);

  dly_t             cnt    [N_STG];
  logic [N_STG-1:0] target;

  // each stage inverts the one before it; stage 0 inverts the last stage
  always_comb begin
    target[0] = ~stage[N_STG-1];
    for (int i = 1; i < N_STG; i++) target[i] = ~stage[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= REST;
      for (int i = 0; i < N_STG; i++) cnt[i] <= '0;
    end else if (!en) begin
      stage <= REST;
      for (int i = 0; i < N_STG; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N_STG; i++) begin
        if (stage[i] != target[i]) begin
          if (cnt[i] == dly[i]) begin
            stage[i] <= target[i];
            cnt[i]   <= '0;
          end else begin
            cnt[i] <= cnt[i] + 1'b1;
          end
        end else begin
          cnt[i] <= '0;
        end
      end
    end
  end

  assign ro_out = stage[N_STG-1];

endmodule
