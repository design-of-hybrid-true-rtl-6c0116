// tb_htrng_postproc: checks the post-processor. A random bit stream with
// random gaps is fed in, alternately with the corrector on and bypassed.
// Bypassed, every bit must come out unchanged; with the corrector on, one
// bit per input pair must come out, equal to the XOR of the pair. A clear
// or a mode change between phases must drop a half-collected pair. Outputs are
// collected and compared in order against a reference list.
module tb_htrng_postproc;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, pp_en = 1'b0, bit_in = 1'b0, bit_valid = 1'b0;
  logic bit_out, bit_out_valid;
  int checks = 0, failures = 0;
  logic expq [$];
  logic gotq [$];

  htrng_postproc dut (.clk, .rst_n, .clear, .pp_en, .bit_in, .bit_valid, .bit_out, .bit_out_valid);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && bit_out_valid) gotq.push_back(bit_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 12; phase++) begin
      logic pend;
      automatic bit have = 1'b0;
      // odd phases change the mode, even ones keep it and pulse clear
      if (phase[0]) pp_en = ~pp_en;
      else begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
      end
      @(negedge clk);  // let the mode change settle
      @(negedge clk);
      for (int n = 0; n < 200; n++) begin
        bit_in    = 1'($urandom);
        bit_valid = ($urandom_range(0, 3) != 0);
        if (bit_valid) begin
          if (!pp_en) expq.push_back(bit_in);
          else if (!have) begin pend = bit_in; have = 1'b1; end
          else begin expq.push_back(pend ^ bit_in); have = 1'b0; end
        end
        @(negedge clk);
      end
      bit_valid = 1'b0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (gotq.size() != expq.size()) begin
      failures++;
      $display("FAIL: %0d bits out, expected %0d", gotq.size(), expq.size());
    end
    for (int i = 0; i < expq.size() && i < gotq.size(); i++) begin
      checks++;
      if (gotq[i] != expq[i]) begin
        failures++;
        $display("FAIL: bit %0d is %0b, expected %0b", i, gotq[i], expq[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
