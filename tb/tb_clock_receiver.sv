// tb_clock_receiver: a reference 500 kHz train (20 station clocks per period)
// with 1-pulse and 4-pulse gaps, delayed by an arbitrary phase, drives the
// receiver. Checks: the ungapped output has exactly one rising and one
// falling strobe per 20 clocks, also through the gaps; one_gap and four_gap
// fire once per gap of the right kind and never otherwise; the ÷20 feedback
// stays locked to the received edges.
module tb_clock_receiver;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  logic train, ungapped, div20_fb, bit_rise, bit_fall, one_gap, four_gap;
  clock_receiver #(.CLKS_PER_PULSE(20)) dut (
    .clk, .rst, .train_in(train), .ungapped, .div20_fb, .bit_rise, .bit_fall, .one_gap, .four_gap
  );

  int n1 = 0, n4 = 0, exp1 = 0, exp4 = 0;
  int last_rise = -1, cyc = 0;
  bit locked = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      n1 += int'(one_gap);
      n4 += int'(four_gap);
      if (bit_rise) begin
        if (locked) begin
          checks++;
          if (cyc - last_rise != 20) begin failures++; $display("FAIL bit_rise spacing %0d", cyc - last_rise); end
        end
        last_rise = cyc;
      end
    end
  end

  // period p: high for 10 clocks unless removed
  task automatic period(bit present);
    train = present;
    repeat (10) @(negedge clk);
    train = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    train = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (7) @(negedge clk);              // arbitrary phase
    for (int i = 0; i < 10; i++) period(1);
    locked = 1;
    for (int g = 0; g < 12; g++) begin
      bit four;
      four = (g % 3 == 2);
      for (int i = 0; i < (four ? 4 : 1); i++) period(0);
      for (int i = 0; i < 6 + g; i++) period(1);
      if (four) exp4++; else exp1++;
    end
    // ungapped square is high in the half after a received rising edge
    train = 1;
    repeat (6) @(negedge clk);
    checks++;
    if (!div20_fb) begin failures++; $display("FAIL div20 phase"); end
    train = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (div20_fb) begin failures++; $display("FAIL div20 phase low half"); end
    checks += 2;
    if (n1 != exp1) begin failures++; $display("FAIL one_gap count %0d exp %0d", n1, exp1); end
    if (n4 != exp4) begin failures++; $display("FAIL four_gap count %0d exp %0d", n4, exp4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
