// tb_timing_transmitter: drives the transmitter at 1 MHz with zero-crossing
// pulses and RESET requests and decodes the output train: every high is one
// clock (a 2 us period), a normal low is one clock, a 1-gap is a low of three
// clocks and a 4-gap a low of nine. Checks one 1-gap per four zero crossings,
// one 4-gap per RESET, no other low lengths, and the 500 kHz pulse rate.
// Each gap is also matched to its request: it must end within a few periods
// of the zero crossing or RESET that asked for it. One RESET arrives together
// with a beam-cycle crossing; the 4-gap must then come first and the 1-gap
// right after it.
module tb_timing_transmitter;
  logic clk = 0, rst = 1;
  always #500 clk = ~clk;          // 1 MHz
  int checks = 0, failures = 0;

  logic zero_cross, reset_req, train;
  timing_transmitter #(.LINE_DIV(4)) dut (
    .clk_1mhz(clk), .rst, .zero_cross, .reset_req, .pulse_train(train)
  );

  int low_run = 0, high_run = 0, n1 = 0, n4 = 0, nbad = 0, npulses = 0;
  bit started = 0;
  int clk_n = 0;
  int gap1_t[$], gap4_t[$];       // clock of the first pulse after each gap
  always @(posedge clk) clk_n++;
  always @(posedge clk) begin
    if (!rst) begin
      if (train) begin
        if (started && low_run != 0) begin
          if (low_run == 3) begin n1++; gap1_t.push_back(clk_n); end
          else if (low_run == 9) begin n4++; gap4_t.push_back(clk_n); end
          else if (low_run != 1) begin nbad++; $display("FAIL low run %0d", low_run); end
        end
        if (high_run != 0) begin nbad++; $display("FAIL long high"); end
        started = 1;
        npulses++;
        low_run = 0;
        high_run++;
      end else begin
        high_run = 0;
        if (started) low_run++;
      end
    end
  end

  initial begin
    int nzc, nrr, t0, p0;
    int zc4_t[$], rr_t[$];
    zero_cross = 0; reset_req = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    nzc = 0; nrr = 0;
    repeat (20) @(negedge clk);
    t0 = 0; p0 = npulses;
    for (int i = 0; i < 400; i++) begin
      // crossings at i = 5, 15, ...; every fourth (35, 75, ..., 275) is a
      // beam cycle. The second RESET comes with the crossing at 275.
      if (i % 10 == 5) begin
        zero_cross = 1; nzc++;
        if (nzc % 4 == 0) zc4_t.push_back(clk_n);
      end
      if (i % 10 == 8) zero_cross = 0;
      if (i == 133 || i == 275) begin reset_req = 1; nrr++; rr_t.push_back(clk_n); end
      if (i == 137 || i == 279) reset_req = 0;
      @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks += 4;
    if (n1 != nzc / 4) begin failures++; $display("FAIL 1-gaps %0d exp %0d", n1, nzc / 4); end
    if (n4 != nrr)     begin failures++; $display("FAIL 4-gaps %0d exp %0d", n4, nrr); end
    if (nbad != 0)     begin failures++; end
    // 440 clocks = 220 periods; 1-gaps remove one pulse, 4-gaps four
    if (npulses - p0 != 220 - n1 - 4 * n4)
      begin failures++; $display("FAIL pulse count %0d", npulses - p0); end
    // each gap against its request (latency in 1 us clocks)
    for (int k = 0; k < zc4_t.size() && k < gap1_t.size(); k++) begin
      int lat;
      lat = gap1_t[k] - zc4_t[k];
      checks++;
      // synchroniser, the divide-by-4 and the wait for a period boundary,
      // plus up to a whole 4-gap when the two requests meet
      if (lat < 4 || lat > (zc4_t[k] == rr_t[1] ? 20 : 9))
        begin failures++; $display("FAIL 1-gap %0d latency %0d", k, lat); end
    end
    for (int k = 0; k < rr_t.size() && k < gap4_t.size(); k++) begin
      int lat;
      lat = gap4_t[k] - rr_t[k];
      checks++;
      if (lat < 12 || lat > 16)
        begin failures++; $display("FAIL 4-gap %0d latency %0d", k, lat); end
    end
    // the collision: the 4-gap first, then the 1-gap, two clocks apart
    // (one separating pulse, then the three-clock low)
    checks++;
    if (!(gap1_t.size() >= 7 && gap4_t.size() >= 2 && gap1_t[6] - gap4_t[1] == 4))
      begin failures++; $display("FAIL gap order at the collision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
