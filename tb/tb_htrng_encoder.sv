// tb_htrng_encoder: checks the flip-flop delay ring. For several delay
// settings it enables the ring and records every change of the 3-bit stage
// code. A three-inverter ring with one travelling edge must step through
// 010, 011, 001, 101, 100, 110 (stage d3 d2 d1 as bits 2..0) and dwell in
// each code for the delay of the stage that switches next, dly + 1 cycles.
// It also checks that the ring rests at 010 while disabled.
module tb_htrng_encoder;
  import htrng_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  dly_t dly [NSTAGES];
  logic [2:0] stage;
  logic ro_out;
  int checks = 0, failures = 0;

  htrng_encoder dut (.clk, .rst_n, .en, .dly, .stage, .ro_out);

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

  // expected code sequence; the stage switching out of code k is k mod 3
  localparam logic [2:0] SEQ [6] = '{3'b010, 3'b011, 3'b001, 3'b101, 3'b100, 3'b110};

  initial begin
    for (int i = 0; i < NSTAGES; i++) dly[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 12; trial++) begin
      int unsigned dwell;
      logic [2:0] prev;
      for (int i = 0; i < NSTAGES; i++)
        dly[i] = (trial == 0) ? dly_t'(0) : dly_t'($urandom_range(0, 15));
      @(negedge clk);
      check(stage == 3'b010 && ro_out == 1'b0, "rest state while disabled");
      en = 1'b1;
      prev  = stage;
      dwell = 0;
      // follow 4 full periods (24 code changes)
      for (int k = 0; k < 24; ) begin
        @(negedge clk);
        dwell++;
        if (stage != prev) begin
          check(stage == SEQ[(k + 1) % 6],
                $sformatf("code %b after %b (step %0d)", stage, prev, k));
          check(dwell == int'(dly[k % 3]) + 1,
                $sformatf("dwell %0d, expected %0d (stage %0d)", dwell, dly[k % 3] + 1, k % 3));
          check(ro_out == stage[2], "ro_out is stage d3");
          prev  = stage;
          dwell = 0;
          k++;
        end else if (dwell > 40) begin
          check(1'b0, "ring stopped");
          break;
        end
      end
      en = 1'b0;
      @(negedge clk);
      check(stage == 3'b010, "back to rest when disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
