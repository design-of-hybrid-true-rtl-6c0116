// tb_htrng_serial_gen: checks the shift-register bit generator. After a seed
// is loaded the state must equal the seed (1 for a zero seed); the state must
// then run through all 255 non-zero values before repeating; and the output
// bits must obey the recurrence of the feedback polynomial,
// s[n+8] = s[n] ^ s[n+2] ^ s[n+3] ^ s[n+4]. Each step gives exactly one
// valid bit, one cycle later.
module tb_htrng_serial_gen;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [7:0] seed = '0, state;
  logic ser_bit, ser_valid;
  int checks = 0, failures = 0;

  htrng_serial_gen dut (.clk, .rst_n, .load, .seed, .step, .ser_bit, .ser_valid, .state);

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
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 4; trial++) begin
      automatic logic bits [$];
      automatic bit seen [256];
      logic [7:0] s0;
      int unsigned first_repeat;
      seed = (trial == 0) ? 8'h00 : 8'($urandom_range(1, 255));
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check(state == ((seed == 0) ? 8'h01 : seed), $sformatf("state %h after loading %h", state, seed));
      s0 = state;
      foreach (seen[i]) seen[i] = 1'b0;
      first_repeat = 0;
      for (int n = 0; n < 600; n++) begin
        if (n < 256) begin
          if (seen[state] && first_repeat == 0) first_repeat = n;
          seen[state] = 1'b1;
        end
        // idle cycles between steps must not advance anything
        if ((n % 7) == 3) begin
          automatic logic [7:0] hold = state;
          @(negedge clk);
          check(state == hold && !ser_valid, "no advance without step");
        end
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        bits.push_back(ser_bit);
        check(ser_valid, "valid after step");
      end
      check(first_repeat == 255, $sformatf("period %0d", first_repeat));
      check(!seen[0], "zero state never reached");
      for (int n = 0; n + 8 < bits.size(); n++)
        check(bits[n+8] == (bits[n] ^ bits[n+2] ^ bits[n+3] ^ bits[n+4]),
              $sformatf("recurrence at bit %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
