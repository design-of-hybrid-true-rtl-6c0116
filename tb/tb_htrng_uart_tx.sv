// tb_htrng_uart_tx: checks the serial transmitter with a short bit time. A
// receiver model in the testbench finds each start bit, samples every bit in
// its middle and checks the start bit, eight data bits LSB first and the stop
// bit. It also checks that a frame occupies exactly 10 bit times (ready low
// for 10 * CLKS_PER_BIT cycles) and that start is ignored while busy.
module tb_htrng_uart_tx;
  localparam int unsigned CPB = 6;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] data = '0;
  logic ready, txd;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  logic [7:0] got [$];

  htrng_uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .start, .data, .ready, .txd);

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

  // receiver model
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (!txd) begin
        repeat (CPB / 2) @(negedge clk);
        check(!txd, "start bit held");
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(negedge clk);
          b[i] = txd;
        end
        repeat (CPB) @(negedge clk);
        check(txd, "stop bit high");
        got.push_back(b);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(txd && ready, "idle high and ready");
    for (int n = 0; n < 40; n++) begin
      int busy;
      while (!ready) @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      data  = 8'($urandom);
      start = 1'b1;
      sent.push_back(data);
      @(negedge clk);
      start = 1'b0;
      busy = 0;
      while (!ready) begin
        // a start while busy must be ignored
        if (busy == 3) begin
          data = ~data;
          start = 1'b1;
        end else begin
          start = 1'b0;
        end
        @(negedge clk);
        busy++;
      end
      start = 1'b0;
      check(busy == 10 * CPB, $sformatf("frame took %0d cycles", busy));
    end
    repeat (3 * CPB) @(negedge clk);
    check(got.size() == sent.size(), $sformatf("%0d bytes received of %0d", got.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("byte %0d: %h expected %h", i, got[i], sent[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
