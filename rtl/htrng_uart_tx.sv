// htrng_uart_tx: serial transmitter that sends the random bytes to the host
// (through an external USB-to-serial bridge). Frames are 8N1: a low start
// bit, eight data bits least significant first, a high stop bit, each held
// for CLKS_PER_BIT clock cycles. The default 608 is a 70.062 MHz clock at
// about 115200 baud.
//
// Interface: start with data loads a frame when ready is high; ready is low
// from the cycle after start until the stop bit has been sent; txd idles high.
// Timing: a frame takes 10 * CLKS_PER_BIT cycles.
// Sending the bytes to a host over a serial link follows the original
// design; the frame format and the baud rate are this design's choices.
module htrng_uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 608
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;

  assign ready = (bits_left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      txd       <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        clk_cnt   <= '0;
        txd       <= 1'b0;
      end
    end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
      clk_cnt   <= '0;
      bits_left <= bits_left - 1'b1;
      frame     <= {1'b1, frame[9:1]};
      txd       <= (bits_left == 4'd1) ? 1'b1 : frame[1];
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end

endmodule
