// htrng_fifo: the first-in first-out buffer between the byte register and the
// host link, DEPTH words of W bits held in a memory array (one block RAM at
// the default 256 x 8). Writes to a full FIFO are dropped and reported on
// overflow; reads of an empty FIFO are ignored.
//
// Interface: wr_en/wr_data write; rd_en reads, rd_data holds the word one
// cycle later (registered read, as a block RAM gives); full, empty and count
// give the fill state. A write and a read in the same cycle are both done.
// The 256-entry byte FIFO follows the original design; the drop-on-full
// policy and the registered read are this design's choices.
module htrng_fifo
  import htrng_pkg::*;
#(
  parameter int unsigned W     = BYTE_W,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [W-1:0]           wr_data,
  input  logic                   rd_en,
  output logic [W-1:0]           rd_data,
  output logic                   full,
  output logic                   empty,
  output logic                   overflow,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign full     = (count == (AW+1)'(DEPTH));
  assign empty    = (count == '0);
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_en && !empty;
  assign overflow = wr_en && full;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // the fill count never leaves 0..DEPTH
  a_count_range : assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
