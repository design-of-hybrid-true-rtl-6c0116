// htrng_ctrl: control logic of the HTRNG. It registers the enable pin and
// produces the sampling strobe that paces the whole bit pipeline: while
// running, sample_tick pulses once every (sample_div + 1) reference-clock
// cycles, so sample_div = 0 samples on every clock and larger settings give
// the slower, programmable sampling rates.
//
// Interface: en is the enable pin; run is en registered once; sample_tick is
// a one-cycle strobe. Timing: the first strobe comes sample_div + 1 cycles
// after run rises; when en falls, run falls one cycle later and strobes stop.
//
// The enable pin and programmable sampling levels follow the original
// design; the divider counter and its width are this design's.
module htrng_ctrl
  import htrng_pkg::*;
#(
  parameter int unsigned DW = DIV_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] sample_div,
  output logic          run,
  output logic          sample_tick
);

  logic [DW-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      div_cnt     <= '0;
      sample_tick <= 1'b0;
    end else begin
      run         <= en;
      sample_tick <= 1'b0;
      if (!run) begin
        div_cnt <= '0;
      end else if (div_cnt >= sample_div) begin
        div_cnt     <= '0;
        sample_tick <= 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule
