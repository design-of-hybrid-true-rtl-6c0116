// htrng_top: hybrid true random number generator. A flip-flop ring of three
// delay stages (the encoder) oscillates in place of a ring oscillator; two
// flip-flops sample it at a programmable rate; a seeded shift-register
// generator runs alongside; a multiplexer picks one of the two bit streams;
// an optional post-processor (XOR corrector) conditions it; an 8-bit register
// packs the bits into bytes; a 256-byte FIFO buffers them; and a serial
// transmitter sends them to the host.
//
// Interface: en starts and stops generation (the Enable pin); src_sel picks
// the sampled encoder (0) or the serial generator (1); pp_en switches the
// post-processor in; dly sets the three stage delays; sample_div sets the
// sampling strobe to one per sample_div + 1 cycles; seed_load/seed reseed the
// serial generator. txd is the serial output to the host; fifo_full,
// fifo_empty, fifo_level and overflow (sticky until reset) report the
// buffer state.
// Timing: one byte is produced every 8 * (sample_div + 1) cycles, twice that
// with the post-processor on; the link drains one byte per 10 * CLKS_PER_BIT
// cycles, and bytes arriving at a full FIFO are dropped.
//
// The chain of blocks follows the original design; how each block works
// inside, the drop policy and the link format are this design's choices
// (see each block).
module htrng_top
  import htrng_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 608,
  parameter int unsigned DEPTH        = FIFO_DEPTH,
  parameter logic [7:0]  SEED         = 8'h5A
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  src_sel_e         src_sel,
  input  logic             pp_en,
  input  dly_t             dly [NSTAGES],
  input  logic [DIV_W-1:0] sample_div,
  input  logic             seed_load,
  input  logic [7:0]       seed,
  output logic             txd,
  output logic             fifo_full,
  output logic             fifo_empty,
  output logic [$clog2(DEPTH):0] fifo_level,
  output logic             overflow
);

  logic               run, tick;
  logic               ro_out;
  logic               samp_bit, samp_valid;
  logic               ser_bit, ser_valid;
  logic               mux_bit, mux_valid;
  logic               pp_bit, pp_valid;
  logic [BYTE_W-1:0]  byte_data;
  logic               byte_valid;
  logic [BYTE_W-1:0]  fifo_rd_data;
  logic               fifo_rd, fifo_ovf, rd_pending;
  logic               tx_ready;

  htrng_ctrl u_ctrl (
    .clk, .rst_n, .en, .sample_div, .run, .sample_tick(tick)
  );

  htrng_encoder u_enc (
    .clk, .rst_n, .en(run), .dly, .stage(), .ro_out
  );

  htrng_sampler u_samp (
    .clk, .rst_n, .din(ro_out), .tick, .bit_out(samp_bit), .bit_valid(samp_valid)
  );

  htrng_serial_gen #(.W(8), .SEED(SEED)) u_ser (
    .clk, .rst_n, .load(seed_load), .seed, .step(tick),
    .ser_bit, .ser_valid, .state()
  );

  htrng_mux u_mux (
    .clk, .rst_n, .sel(src_sel),
    .samp_bit, .samp_valid, .ser_bit, .ser_valid,
    .bit_out(mux_bit), .bit_valid(mux_valid)
  );

  htrng_postproc u_pp (
    .clk, .rst_n, .clear(!run), .pp_en, .bit_in(mux_bit), .bit_valid(mux_valid),
    .bit_out(pp_bit), .bit_out_valid(pp_valid)
  );

  htrng_byte_reg u_byte (
    .clk, .rst_n, .clear(!run), .bit_in(pp_bit), .bit_valid(pp_valid),
    .byte_out(byte_data), .byte_valid
  );

  htrng_fifo #(.W(BYTE_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(byte_valid), .wr_data(byte_data),
    .rd_en(fifo_rd), .rd_data(fifo_rd_data),
    .full(fifo_full), .empty(fifo_empty), .overflow(fifo_ovf), .count(fifo_level)
  );

  // Read one byte when the transmitter is idle; start it the next cycle,
  // when the FIFO's registered read data is there.
  assign fifo_rd = tx_ready && !fifo_empty && !rd_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      rd_pending <= fifo_rd;
      if (fifo_ovf) overflow <= 1'b1;
    end
  end

  htrng_uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(rd_pending), .data(fifo_rd_data), .ready(tx_ready), .txd
  );

endmodule
