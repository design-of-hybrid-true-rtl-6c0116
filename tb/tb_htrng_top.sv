// tb_htrng_top: end-to-end test of the hybrid TRNG with a short serial bit
// time (4 cycles) and an 8-byte FIFO so that every mechanism is reached in a
// few thousand cycles. The phases and checks are described in
// tb_htrng_top_body.svh.
module tb_htrng_top;
  import htrng_pkg::*;

  localparam int unsigned CPB   = 4;
  localparam int unsigned DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, pp_en = 1'b0, seed_load = 1'b0;
  src_sel_e src_sel = SRC_SERIAL;
  dly_t dly [NSTAGES];
  logic [DIV_W-1:0] sample_div = '0;
  logic [7:0] seed = '0;
  logic txd, fifo_full, fifo_empty, overflow;
  logic [$clog2(DEPTH):0] fifo_level;

  htrng_top #(.CLKS_PER_BIT(CPB), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .en, .src_sel, .pp_en, .dly, .sample_div, .seed_load, .seed,
    .txd, .fifo_full, .fifo_empty, .fifo_level, .overflow);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_htrng_top_body.svh"
endmodule
