// tb_htrng_ctrl: checks the control logic. For random divider settings it
// enables the block and measures the gap between sampling strobes, which must
// be sample_div + 1 cycles, the delay of the first strobe after run rises,
// and that run follows en one cycle later and strobes stop when disabled.
module tb_htrng_ctrl;
  import htrng_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [DIV_W-1:0] sample_div = '0;
  logic run, sample_tick;
  int checks = 0, failures = 0;

  htrng_ctrl dut (.clk, .rst_n, .en, .sample_div, .run, .sample_tick);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 20; trial++) begin
      int unsigned n, last;
      sample_div = (trial < 2) ? DIV_W'(trial) : DIV_W'($urandom_range(0, 20));
      @(negedge clk);
      en = 1'b1;
      @(negedge clk);
      check(run == 1'b1, "run follows en after one cycle");
      // run is high from this cycle; count cycles until each strobe
      n = 0; last = 0;
      for (int t = 1; t <= 6 * (int'(sample_div) + 1); t++) begin
        @(negedge clk);
        if (sample_tick) begin
          if (n == 0) check(t == int'(sample_div) + 1,
                            $sformatf("first strobe at %0d, div %0d", t, sample_div));
          else        check(t - last == int'(sample_div) + 1,
                            $sformatf("strobe gap %0d, div %0d", t - last, sample_div));
          last = t;
          n++;
        end
      end
      check(n == 6, $sformatf("%0d strobes in 6 periods", n));
      en = 1'b0;
      @(negedge clk);
      check(run == 1'b0, "run drops after en");
      n = 0;
      repeat (30) begin
        @(negedge clk);
        if (sample_tick) n++;
      end
      check(n == 0, "no strobes while stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
