// tb_htrng_mux: checks the source multiplexer with random bits, valid flags
// and selections: one cycle after each input, the output must carry the bit
// and valid flag of the selected source.
module tb_htrng_mux;
  import htrng_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  src_sel_e sel = SRC_SAMPLED;
  logic samp_bit = 0, samp_valid = 0, ser_bit = 0, ser_valid = 0;
  logic bit_out, bit_valid;
  int checks = 0, failures = 0;
  int n_samp = 0, n_ser = 0;

  htrng_mux dut (.clk, .rst_n, .sel, .samp_bit, .samp_valid, .ser_bit, .ser_valid,
                 .bit_out, .bit_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_bit, exp_valid;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      sel        = src_sel_e'($urandom_range(0, 1));
      samp_bit   = 1'($urandom);
      samp_valid = 1'($urandom);
      ser_bit    = 1'($urandom);
      ser_valid  = 1'($urandom);
      exp_bit    = (sel == SRC_SERIAL) ? ser_bit : samp_bit;
      exp_valid  = (sel == SRC_SERIAL) ? ser_valid : samp_valid;
      if (sel == SRC_SERIAL) n_ser++; else n_samp++;
      @(negedge clk);
      checks++;
      if (bit_out != exp_bit || bit_valid != exp_valid) begin
        failures++;
        $display("FAIL: sel %s out %0b/%0b expected %0b/%0b", sel.name(), bit_out, bit_valid,
                 exp_bit, exp_valid);
      end
    end
    checks++;
    if (n_ser == 0 || n_samp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
