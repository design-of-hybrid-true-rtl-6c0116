// tb_htrng_byte_reg: checks the byte register. Random bits with random gaps
// are shifted in, with an occasional clear; every group of 8 bits since the
// last clear must come out as one byte, first bit in the most significant
// position, one cycle after its last bit.
module tb_htrng_byte_reg;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, bit_in = 1'b0, bit_valid = 1'b0;
  logic [7:0] byte_out;
  logic byte_valid;
  int checks = 0, failures = 0;
  logic [7:0] expq [$];

  htrng_byte_reg dut (.clk, .rst_n, .clear, .bit_in, .bit_valid, .byte_out, .byte_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] acc = '0;
    int nb = 0;
    bit done_now;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      clear     = ($urandom_range(0, 199) == 0);
      bit_in    = 1'($urandom);
      bit_valid = ($urandom_range(0, 2) != 0);
      done_now  = 1'b0;
      if (clear) nb = 0;
      else if (bit_valid) begin
        acc = {acc[6:0], bit_in};
        nb++;
        if (nb == 8) begin
          nb = 0;
          done_now = 1'b1;
        end
      end
      @(negedge clk);
      checks++;
      if (byte_valid != done_now) begin
        failures++;
        $display("FAIL: t=%0d byte_valid %0b expected %0b", t, byte_valid, done_now);
      end else if (done_now) begin
        checks++;
        if (byte_out != acc) begin
          failures++;
          $display("FAIL: byte %h expected %h", byte_out, acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
