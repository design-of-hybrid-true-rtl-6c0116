// tb_htrng_sampler: checks the two sampling flip-flops. A random bit is
// driven every cycle and random strobes are given; each valid output bit must
// equal the input driven two clock edges before it became valid, i.e. one
// cycle before the strobe, and valid must appear exactly once per strobe.
module tb_htrng_sampler;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, tick = 1'b0;
  logic bit_out, bit_valid;
  int checks = 0, failures = 0;
  logic hist_din [$];
  logic hist_tick [$];

  htrng_sampler dut (.clk, .rst_n, .din, .tick, .bit_out, .bit_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // hist_*[i] are the values driven before edge i of this loop
      if (hist_din.size() >= 3) begin
        automatic int i = hist_din.size();
        checks++;
        if (bit_valid != hist_tick[i-1]) begin
          failures++;
          $display("FAIL: valid %0b, strobe was %0b", bit_valid, hist_tick[i-1]);
        end
        if (bit_valid) begin
          n++;
          checks++;
          if (bit_out != hist_din[i-2]) begin
            failures++;
            $display("FAIL: t=%0d bit %0b, expected %0b", t, bit_out, hist_din[i-2]);
          end
        end
      end
      din  = 1'($urandom);
      tick = ($urandom_range(0, 2) == 0);
      hist_din.push_back(din);
      hist_tick.push_back(tick);
    end
    checks++;
    if (n < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
