// tb_dual_timer_card: programs the card over the bus. Channel A counts the
// external 10 MHz clock from the external start; channel B is started by A's
// output, so B's pulse comes preset_A + preset_B clocks after the start. Also
// checks CPU start, the CPU-clock source, register read-back, the status
// register and its clear-on-read, count read-back, that a CPU-only channel
// ignores the other start sources, and delays for random presets.
module tb_dual_timer_card;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;

  bus_req_t bus;
  logic sel;
  logic [7:0] rdata;
  logic cpu_tick;
  logic [1:0] ext_start, out;

  dual_timer_card dut (.clk, .rst, .bus, .sel, .rdata, .cpu_tick, .ext_tick(1'b1), .ext_start, .out);

  assign cpu_tick = (cyc % 10) == 0;
  assign sel = bus.vma;

  task automatic wr(logic [3:0] a, logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b0, addr: {12'h800, a}, wdata: d};
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic rd(logic [3:0] a, output logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b1, addr: {12'h800, a}, wdata: 8'h00};
    #1 d = rdata;
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  int ta, tb_, t0;
  always @(posedge clk) begin
    cyc++;
    if (out[0]) ta = cyc;
    if (out[1]) tb_ = cyc;
  end

  initial begin
    logic [7:0] d;
    bus = '0; ext_start = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // A: preset 0x0123, external clock, external start
    wr(4'h0, 8'h01); wr(4'h1, 8'h23); wr(4'h2, 8'b001);
    // B: preset 0x0040, external clock, started by A
    wr(4'h8, 8'h00); wr(4'h9, 8'h40); wr(4'hA, 8'b101);
    rd(4'h0, d); check("preset A hi", d, 8'h01);
    rd(4'h1, d); check("preset A lo", d, 8'h23);
    rd(4'hA, d); check("ctrl B", d, 8'b101);
    ta = -1; tb_ = -1;
    @(negedge clk); ext_start = 2'b11; t0 = cyc; @(negedge clk); ext_start = 0;
    repeat (100) @(negedge clk);
    rd(4'h4, d); check("A running", d, 8'b10);
    rd(4'h5, d); t0 = t0;
    repeat (400) @(negedge clk);
    // start clock edge is t0+1; the pulse shows one edge after the match
    check("A delay", ta - t0, 'h123 + 2);
    check("B chained delay", tb_ - ta, 'h40 + 1);
    rd(4'h4, d);  check("A done", d, 8'b01);
    rd(4'h4, d);  check("A done cleared by read", d, 8'b00);
    rd(4'hC, d);  check("B done", d, 8'b01);
    rd(4'h6, d);  check("A count lo", d, 8'h23);
    // B on the CPU clock, CPU start
    wr(4'h9, 8'h05); wr(4'hA, 8'b010);
    tb_ = -1;
    wr(4'hB, 8'h00); t0 = cyc;
    repeat (80) @(negedge clk);
    checks++;
    if (tb_ - t0 < 40 || tb_ - t0 > 52) begin failures++; $display("FAIL cpu clock delay %0d", tb_ - t0); end
    // CPU-only start ignores the external start and the other channel
    wr(4'h2, 8'b011); wr(4'h3, 8'h00);           // A: CPU start, runs now
    ta = -1;
    @(negedge clk); ext_start = 2'b11; @(negedge clk); ext_start = 0;
    repeat (400) @(negedge clk);
    check("A fired once from the CPU start", ta > 0, 1);
    tb_ = -1;
    @(negedge clk); ext_start = 2'b10; @(negedge clk); ext_start = 0;  // B is CPU-only too
    repeat (100) @(negedge clk);
    check("B ignores external start when CPU-only", tb_, -1);
    // random presets on the 10 MHz clock: A external, B chained to A
    wr(4'h2, 8'b001); wr(4'hA, 8'b101);
    for (int k = 0; k < 20; k++) begin
      logic [15:0] pa, pb;
      pa = 16'(1 + $urandom % 600); pb = 16'(1 + $urandom % 300);
      wr(4'h0, pa[15:8]); wr(4'h1, pa[7:0]); wr(4'h8, pb[15:8]); wr(4'h9, pb[7:0]);
      ta = -1; tb_ = -1;
      @(negedge clk); ext_start = 2'b01; t0 = cyc; @(negedge clk); ext_start = 0;
      repeat (int'(pa) + int'(pb) + 20) @(negedge clk);
      check("A delay (random preset)", ta - t0, int'(pa) + 2);
      check("B delay (random preset)", tb_ - ta, int'(pb) + 1);
      rd(4'h5, d); check("A count hi", d, pa[15:8]);
      rd(4'hD, d); check("B count hi", d, pb[15:8]);
      rd(4'hE, d); check("B count lo", d, pb[7:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
