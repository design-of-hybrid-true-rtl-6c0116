// tb_htrng_top_body.svh: the end-to-end test shared by tb_htrng_top (short
// bit time, small FIFO) and tb_htrng_top_full (every parameter at its
// default). The including module declares CPB and DEPTH, the stimulus
// signals and the instance dut; the test sees only the top's ports.
//
// A receiver model decodes txd into bytes. Four phases follow, each started
// with en, stopped after a whole number of bytes' worth of cycles, and then
// drained through the link:
//   A  serial generator, no post-processing, sampling on every clock: bytes
//      are produced far faster than the link drains them, so the FIFO fills
//      and drops bytes. The received bytes must be an in-order subsequence of
//      a reference LFSR stream started at the loaded seed (8 bits per byte,
//      first bit in the MSB), at least DEPTH long and shorter than the number
//      produced, with fifo_full and the sticky overflow flag seen.
//   B  serial generator with the XOR corrector: every output bit must be the
//      XOR of a pair of reference LFSR bits.
//   C  sampled encoder, delays 1,2,0 (oscillation period 12 cycles), sampled
//      every cycle: the bit stream must be runs of six ones and six zeros.
//   D  sampled encoder, delays 0,0,0 (period 6), sampled every 3rd cycle with
//      the corrector on: samples alternate, so every byte must be 8'hFF.
// Phases B to D produce fewer bytes than the FIFO holds, so each must arrive
// complete. Each mechanism (start/stop, both sources, corrector on and
// bypassed, reseeding, FIFO full and dropping, link idle) is counted and
// must occur at least once.

  int checks = 0, failures = 0;
  logic [7:0] received [$];
  int n_dropped = 0, n_full_cycles = 0, n_starts = 0, n_seed = 0;
  int n_serial = 0, n_sampled = 0, n_pp_on = 0, n_pp_off = 0, n_idle = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  int max_level = 0;
  always @(posedge clk) begin
    if (rst_n && fifo_full) n_full_cycles++;
    if (rst_n && int'(fifo_level) > max_level) max_level = int'(fifo_level);
    if (rst_n && (fifo_full != (int'(fifo_level) == DEPTH) || fifo_empty != (fifo_level == 0))) begin
      failures++;
      checks++;
      $display("FAIL: level %0d disagrees with full %0b / empty %0b", fifo_level, fifo_full, fifo_empty);
    end
  end

  // receiver model on txd
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (!txd) begin
        repeat (CPB / 2) @(negedge clk);
        check(!txd, "start bit");
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(negedge clk);
          b[i] = txd;
        end
        repeat (CPB) @(negedge clk);
        check(txd, "stop bit");
        received.push_back(b);
      end
    end
  end

  // reference Galois LFSR, mask 8'hB8
  function automatic logic lfsr_next(ref logic [7:0] s);
    logic b = s[0];
    s = (s >> 1) ^ (b ? 8'hB8 : 8'h00);
    return b;
  endfunction

  // run for exactly nbytes bytes: the first strobe comes div+1 cycles after
  // run rises, each bit takes div+1 cycles (two bits with the corrector), and
  // the last bit needs a few cycles through the pipeline
  task automatic run_phase(input int nbytes);
    en = 1'b1;
    n_starts++;
    repeat (1 + nbytes * 8 * (int'(sample_div) + 1) * (pp_en ? 2 : 1) + 4) @(negedge clk);
    en = 1'b0;
    repeat (10) @(negedge clk);
  endtask

  // wait until the FIFO is empty and the link has been idle for a frame
  task automatic drain();
    int quiet = 0, guard = 0;
    while (quiet < 12 * CPB && guard < (DEPTH + 10) * 12 * CPB) begin
      @(negedge clk);
      guard++;
      quiet = (fifo_empty && txd) ? quiet + 1 : 0;
    end
    check(quiet >= 12 * CPB, "link drained");
    n_idle++;
  endtask

  task automatic load_seed(input logic [7:0] s);
    seed = s;
    seed_load = 1'b1;
    @(negedge clk);
    seed_load = 1'b0;
    n_seed++;
  endtask

  // bytes received since index 'from'
  function automatic int since(int from);
    return received.size() - from;
  endfunction

  initial begin
    logic [7:0] ref_s, exp_b;
    int base, nA, j;
    dly[0] = '0; dly[1] = '0; dly[2] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!overflow && fifo_empty && txd, "idle after reset");

    // phase A: overflow
    src_sel = SRC_SERIAL; pp_en = 1'b0; sample_div = '0;
    load_seed(8'hC3);
    n_serial++; n_pp_off++;
    nA = DEPTH + 40;
    base = received.size();
    run_phase(nA);
    check(overflow && n_full_cycles > 0, "A: FIFO went full and overflow is flagged");
    drain();
    check(since(base) >= DEPTH && since(base) < nA,
          $sformatf("A: %0d bytes received of %0d produced", since(base), nA));
    n_dropped = nA - since(base);
    // received bytes must appear, in order, in the reference stream
    ref_s = 8'hC3;
    j = base;
    for (int i = 0; i < nA && j < received.size(); i++) begin
      for (int k = 0; k < 8; k++) exp_b[7-k] = lfsr_next(ref_s);
      if (received[j] == exp_b) j++;
    end
    check(j == received.size(), $sformatf("A: %0d of %0d bytes match the reference stream in order",
                                          j - base, since(base)));
    // the first DEPTH+1 bytes can never be dropped
    ref_s = 8'hC3;
    for (int i = 0; i < DEPTH && base + i < received.size(); i++) begin
      for (int k = 0; k < 8; k++) exp_b[7-k] = lfsr_next(ref_s);
      check(received[base+i] == exp_b, $sformatf("A: byte %0d %h expected %h", i, received[base+i], exp_b));
    end

    // phase B: serial with corrector
    pp_en = 1'b1; sample_div = 8'd1;
    load_seed(8'h17);
    n_serial++; n_pp_on++;
    base = received.size();
    run_phase(6);
    drain();
    check(since(base) == 6, $sformatf("B: %0d bytes", since(base)));
    ref_s = 8'h17;
    for (int i = base; i < received.size(); i++) begin
      for (int k = 0; k < 8; k++) exp_b[7-k] = lfsr_next(ref_s) ^ lfsr_next(ref_s);
      check(received[i] == exp_b, $sformatf("B: byte %0d %h expected %h", i - base, received[i], exp_b));
    end

    // phase C: sampled encoder
    src_sel = SRC_SAMPLED; pp_en = 1'b0; sample_div = '0;
    dly[0] = 4'd1; dly[1] = 4'd2; dly[2] = 4'd0;
    n_sampled++; n_pp_off++;
    base = received.size();
    run_phase(6);
    drain();
    check(since(base) == 6, $sformatf("C: %0d bytes", since(base)));
    begin
      automatic logic bits [$];
      for (int i = base; i < received.size(); i++)
        for (int k = 7; k >= 0; k--) bits.push_back(received[i][k]);
      for (int n = 0; n + 6 < bits.size(); n++)
        check(bits[n+6] == !bits[n], $sformatf("C: bit %0d not the inverse of bit %0d", n + 6, n));
    end

    // phase D: sampled encoder with corrector
    pp_en = 1'b1; sample_div = 8'd2;
    dly[0] = '0; dly[1] = '0; dly[2] = '0;
    n_sampled++; n_pp_on++;
    base = received.size();
    run_phase(6);
    drain();
    check(since(base) == 6, $sformatf("D: %0d bytes", since(base)));
    for (int i = base; i < received.size(); i++)
      check(received[i] == 8'hFF, $sformatf("D: byte %h", received[i]));

    $display("starts %0d, seeds %0d, serial %0d, sampled %0d, corrector on %0d, off %0d",
             n_starts, n_seed, n_serial, n_sampled, n_pp_on, n_pp_off);
    $display("bytes received %0d, dropped %0d, cycles full %0d, link idle %0d",
             received.size(), n_dropped, n_full_cycles, n_idle);
    check(n_starts > 0 && n_seed > 0 && n_serial > 0 && n_sampled > 0, "sources and starts exercised");
    check(n_pp_on > 0 && n_pp_off > 0, "corrector on and bypassed");
    check(n_dropped > 0 && n_full_cycles > 0 && max_level == DEPTH, "FIFO full and dropping");
    check(n_idle > 0 && received.size() > 0, "link drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
