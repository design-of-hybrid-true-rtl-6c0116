// tb_htrng_top_full: the end-to-end test of tb_htrng_top_body.svh run on the
// hybrid TRNG with every parameter at its default: a 256-byte FIFO and 608
// clock cycles per serial bit (115200 baud from a 70.062 MHz clock). Phase A
// fills the whole FIFO and overflows it; the link then drains all 256 bytes.
module tb_htrng_top_full;
  import htrng_pkg::*;

  localparam int unsigned CPB   = 608;
  localparam int unsigned DEPTH = FIFO_DEPTH;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, pp_en = 1'b0, seed_load = 1'b0;
  src_sel_e src_sel = SRC_SERIAL;
  dly_t dly [NSTAGES];
  logic [DIV_W-1:0] sample_div = '0;
  logic [7:0] seed = '0;
  logic txd, fifo_full, fifo_empty, overflow;
  logic [$clog2(DEPTH):0] fifo_level;

  htrng_top dut (
    .clk, .rst_n, .en, .src_sel, .pp_en, .dly, .sample_div, .seed_load, .seed,
    .txd, .fifo_full, .fifo_empty, .fifo_level, .overflow);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_htrng_top_body.svh"
endmodule
