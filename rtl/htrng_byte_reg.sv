// htrng_byte_reg: the 8-bit register that collects the serial random bits
// into bytes. Each valid bit is shifted in at the low end, so the first bit
// of a byte ends up as its most significant bit; after BW bits the byte is
// presented for one cycle with byte_valid.
//
// Interface: bit_in/bit_valid in; byte_out/byte_valid out. clear discards a
// partly collected byte. Timing: byte_valid comes one cycle after the BW-th
// bit of the byte.
// Collecting the stream in 8-bit blocks follows the original design; the
// bit order is this design's choice.
module htrng_byte_reg
  import htrng_pkg::*;
#(
  parameter int unsigned BW = BYTE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          bit_in,
  input  logic          bit_valid,
  output logic [BW-1:0] byte_out,
  output logic          byte_valid
);

  logic [BW-1:0]         shreg;
  logic [$clog2(BW)-1:0] nbits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      nbits      <= '0;
      byte_out   <= '0;
      byte_valid <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (clear) begin
        nbits <= '0;
      end else if (bit_valid) begin
        shreg <= {shreg[BW-2:0], bit_in};
        if (nbits == ($clog2(BW))'(BW - 1)) begin
          nbits      <= '0;
          byte_out   <= {shreg[BW-2:0], bit_in};
          byte_valid <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

endmodule
