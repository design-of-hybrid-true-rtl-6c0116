// tb_htrng_fifo: checks the byte FIFO at its full 256-entry depth against a
// queue model. Random writes and reads run in phases that favour filling or
// draining, so the FIFO goes full (writes dropped, overflow flagged) and empty
// (reads ignored). Read data, one cycle after each read, must match the
// model, as must full, empty and count.
module tb_htrng_fifo;
  localparam int unsigned DEPTH = 256;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  logic full, empty, overflow;
  logic [8:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_ovf = 0;
  logic [7:0] model [$];

  htrng_fifo #(.W(8), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .full, .empty, .overflow, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
    logic [7:0] exp_rd;
    bit rd_done;
    int sz_before;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      automatic int wp = ((t / 1500) % 2 == 0) ? 80 : 20;  // write percentage
      wr_en   = ($urandom_range(0, 99) < wp);
      rd_en   = ($urandom_range(0, 99) < 50);
      wr_data = 8'($urandom);
      #1;
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      check(count == 9'(model.size()), "count");
      check(overflow == (wr_en && model.size() == DEPTH), "overflow flag");
      if (full) n_full++;
      if (empty) n_empty++;
      if (overflow) n_ovf++;
      sz_before = model.size();
      rd_done = rd_en && sz_before > 0;
      if (rd_done) exp_rd = model.pop_front();
      if (wr_en && sz_before < DEPTH) model.push_back(wr_data);
      @(negedge clk);
      if (rd_done) check(rd_data == exp_rd, $sformatf("read %h expected %h", rd_data, exp_rd));
    end
    check(n_full > 0 && n_empty > 0 && n_ovf > 0, "full, empty and overflow all reached");
    $display("cycles full %0d, empty %0d, overflowing %0d", n_full, n_empty, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
