// tb_preset_timer: checks the delay of one timer channel in clock counts for
// random presets, on both clock sources (external every clock, CPU clock every
// tenth), for each start source, a restart during a run, the 16-bit full range
// (preset 0) and the done flag.
module tb_preset_timer;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  logic cpu_tick, ext_tick, clk_sel, start_ext, start_cpu, start_chain, clear_done;
  start_src_e start_sel;
  logic [15:0] preset, count;
  logic running, done, out_pulse;
  int cyc = 0;

  preset_timer #(.WIDTH(16)) dut (.*);

  always @(posedge clk) cyc++;
  assign cpu_tick = (cyc % 10) == 0;
  assign ext_tick = 1'b1;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // start with the chosen source, return clocks to the output pulse
  task automatic run(int src, output int clocks);
    int t0;
    @(negedge clk);
    case (src)
      0: start_ext = 1;
      1: start_cpu = 1;
      default: start_chain = 1;
    endcase
    @(negedge clk);
    start_ext = 0; start_cpu = 0; start_chain = 0;
    t0 = cyc;
    while (!out_pulse && cyc - t0 < 800000) @(negedge clk);
    clocks = cyc - t0;
  endtask

  initial begin
    int c, p;
    {start_ext, start_cpu, start_chain, clear_done, clk_sel} = '0;
    start_sel = START_EXT; preset = 16'd10;
    repeat (3) @(negedge clk);
    rst = 0;
    // external 10 MHz: pulse exactly preset clocks after the start clock
    clk_sel = 1;
    for (int i = 0; i < 20; i++) begin
      p = 1 + ($urandom % 300);
      preset = 16'(p);
      start_sel = start_src_e'(i % 3);
      run(i % 3, c);
      check("ext delay", c, p);
      check("done", int'(done), 1);
      check("stopped", int'(running), 0);
    end
    // CPU clock: preset ticks of the ÷10 clock
    clk_sel = 0;
    preset = 16'd7;
    start_sel = START_CPU;
    run(1, c);
    checks++;
    if (c < 61 || c > 70) begin failures++; $display("FAIL cpu-clock delay %0d", c); end
    // start sources not selected are ignored
    clk_sel = 1; preset = 16'd5; start_sel = START_CHAIN;
    @(negedge clk); start_ext = 1; @(negedge clk); start_ext = 0;
    repeat (20) @(negedge clk);
    check("unselected ext start ignored", int'(running), 0);
    // restart during a run begins the delay again
    preset = 16'd100; start_sel = START_CPU;
    @(negedge clk); start_cpu = 1; @(negedge clk); start_cpu = 0;
    repeat (50) @(negedge clk);
    run(1, c);
    check("restart delay", c, 100);
    // clear_done
    @(negedge clk); clear_done = 1; @(negedge clk); clear_done = 0;
    check("done cleared", int'(done), 0);
    // full range: preset 0 counts 65536
    preset = 16'd0;
    run(1, c);
    check("full range", c, 65536);
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
