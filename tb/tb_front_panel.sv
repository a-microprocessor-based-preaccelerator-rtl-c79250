// tb_front_panel: sets random switch patterns and checks every switch
// register two clocks later; writes and reads back the hex display and LEDs;
// checks the raise/lower buttons, that the interrupt latch is set by a press
// of the interrupt button, stays set after release, and is cleared only by
// writing 1 to the status register.
module tb_front_panel;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic sel;
  logic [7:0] rdata, toggle_sw, leds;
  logic [15:0] addr_sw, data_sw, hex_display;
  logic raise_btn, lower_btn, intr_btn;

  front_panel dut (.*);
  assign sel = bus.vma;

  task automatic wr(logic [3:0] a, logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b0, addr: {12'h80F, a}, wdata: d};
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic rd(logic [3:0] a, output logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b1, addr: {12'h80F, a}, wdata: 8'h00};
    #1 d = rdata;
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [7:0] d;
    logic [15:0] w;
    bus = '0; addr_sw = 0; data_sw = 0; toggle_sw = 0; raise_btn = 0; lower_btn = 0; intr_btn = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) begin
      addr_sw = 16'($urandom); data_sw = 16'($urandom); toggle_sw = 8'($urandom);
      raise_btn = 1'($urandom); lower_btn = 1'($urandom);
      repeat (2) @(negedge clk);
      rd(4'h0, d); check("addr hi", d, addr_sw[15:8]);
      rd(4'h1, d); check("addr lo", d, addr_sw[7:0]);
      rd(4'h2, d); check("data hi", d, data_sw[15:8]);
      rd(4'h3, d); check("data lo", d, data_sw[7:0]);
      rd(4'h4, d); check("toggles", d, toggle_sw);
      rd(4'h5, d); check("buttons", d, {6'd0, lower_btn, raise_btn});
      w = 16'($urandom);
      wr(4'h8, w[15:8]); wr(4'h9, w[7:0]); wr(4'hA, ~w[7:0]);
      check("hex display", hex_display, w);
      check("leds", leds, 8'(~w[7:0]));
      rd(4'h9, d); check("display readback", d, w[7:0]);
    end
    rd(4'h6, d); check("latch clear", d, 0);
    intr_btn = 1; repeat (5) @(negedge clk); intr_btn = 0; repeat (5) @(negedge clk);
    rd(4'h6, d); check("latch set by button", d, 1);
    wr(4'h6, 8'h00);
    rd(4'h6, d); check("latch kept on write 0", d, 1);
    wr(4'h6, 8'h01);
    rd(4'h6, d); check("latch cleared", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
