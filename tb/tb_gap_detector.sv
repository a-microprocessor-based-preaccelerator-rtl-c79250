// tb_gap_detector: feeds rising-edge strobes with intervals of 1..7 pulse
// periods (20 clocks each, with +-2 clocks of jitter) and checks that exactly
// the 2-period intervals give one_gap and the 5-period intervals give
// four_gap, one clock after the edge that ends the gap.
module tb_gap_detector;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  logic rise, one_gap, four_gap;

  gap_detector #(.CLKS_PER_PULSE(20)) dut (.clk, .rst, .rise, .one_gap, .four_gap);

  task automatic edge_after(int interval, bit exp1, bit exp4);
    rise = 0;
    repeat (interval - 1) @(negedge clk);
    rise = 1;
    @(negedge clk);
    rise = 0;
    checks += 2;
    if (one_gap !== exp1)  begin failures++; $display("FAIL one_gap interval %0d", interval); end
    if (four_gap !== exp4) begin failures++; $display("FAIL four_gap interval %0d", interval); end
  endtask

  initial begin
    rise = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    edge_after(30, 0, 0);             // first edge: nothing
    for (int k = 0; k < 300; k++) begin
      int periods, jit;
      periods = 1 + ($urandom % 7);
      if (k < 10) periods = 1;
      jit = int'($urandom % 5) - 2;
      edge_after(periods * 20 + jit, periods == 2, periods == 5);
    end
    // flags stay low between edges
    repeat (10) @(negedge clk);
    checks++;
    if (one_gap || four_gap) begin failures++; $display("FAIL flag held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
