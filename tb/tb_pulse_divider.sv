// tb_pulse_divider: checks the divide-by-N scaler at N = 4 and N = 20 against a
// counting model: tick once every N enabled clocks, half at N/2, the square
// wave's duty, and re-phasing by sync.
module tb_pulse_divider;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  logic en4, en20, sync20;
  logic tick4, half4, sq4, tick20, half20, sq20;

  pulse_divider #(.N(4))  dut4  (.clk, .rst, .en(en4),  .sync(1'b0),   .tick(tick4),  .half(half4),  .sq(sq4));
  pulse_divider #(.N(20), .SYNC_VALUE(1)) dut20 (.clk, .rst, .en(en20), .sync(sync20), .tick(tick20), .half(half20), .sq(sq20));

  int m4, m20;   // model counts
  initial begin
    en4 = 0; en20 = 0; sync20 = 0; m4 = 0; m20 = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      en4  = ($urandom % 3) != 0;
      en20 = 1;
      sync20 = (i == 250);
      #1;
      checks += 4;
      if (tick4 !== (en4 && m4 == 3))    begin failures++; $display("FAIL tick4 at %0d", i); end
      if (half4 !== (en4 && m4 == 1))    begin failures++; $display("FAIL half4 at %0d", i); end
      if (sq4 !== (m4 < 2))              begin failures++; $display("FAIL sq4 at %0d", i); end
      if (tick20 !== (!sync20 && m20 == 19) && !sync20) begin failures++; $display("FAIL tick20 at %0d", i); end
      if (sq20 !== (m20 < 10))           begin failures++; $display("FAIL sq20 at %0d", i); end
      @(negedge clk);
      if (en4) m4 = (m4 + 1) % 4;
      if (sync20) m20 = 1;
      else m20 = (m20 + 1) % 20;
    end
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
