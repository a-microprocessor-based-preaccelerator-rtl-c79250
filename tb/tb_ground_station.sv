// tb_ground_station: runs the ground card file from a bus-master model with a
// model timing train. Checks: the 15 Hz interrupt latch set by a 1-gap and
// cleared by the CPU, the shaft-encoder count read through PIA 3 port A after
// turning the knob up and down, outputs and inputs of the other PIAs, the
// four D/A outputs, the timer started by the beam-cycle mark, an ACIA byte
// over a looped-back link with its receive interrupt, PROM/RAM, and the
// front-panel switches and hex display in slot 15.
module tb_ground_station;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;

  bus_req_t bus;
  logic [7:0] rdata;
  logic irq, timing_rx, div20_fb, link_tx, enc_a, enc_b;
  logic [2:0][7:0] pa_in;
  logic [3:0][7:0] pa_out, pa_oe, pb_in, pb_out, pb_oe;
  logic [3:0] ca2_out, ca2_oe, cb2_out, cb2_oe;
  logic [3:0][11:0] dac_code;
  logic [1:0] timer_out;
  logic gap1 = 0, gap4 = 0;
  logic [15:0] fp_addr_sw = 16'h1234, fp_data_sw = 16'h0310, fp_hex;
  logic [7:0] fp_toggle_sw = 8'h81, fp_leds;
  logic fp_raise = 1, fp_lower = 0, fp_intr = 0;

  tb_train_gen u_gen (.clk, .gap1, .gap4, .train(timing_rx));

  ground_station dut (
    .clk, .rst, .bus, .rdata,
    .fp_addr_sw, .fp_data_sw, .fp_toggle_sw, .fp_raise, .fp_lower, .fp_intr, .fp_hex, .fp_leds, .irq, .timing_rx, .div20_fb, .link_tx, .link_rx(link_tx),
    .enc_a, .enc_b, .pa_in, .pa_out, .pa_oe, .pb_in, .pb_out, .pb_oe,
    .ca1(4'h0), .ca2_in(4'h0), .ca2_out, .ca2_oe, .cb1(4'h0), .cb2_in(4'h0), .cb2_out, .cb2_oe,
    .dac_code, .timer_out
  );

  task automatic wr(logic [15:0] a, logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b0, addr: a, wdata: d};
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic rd(logic [15:0] a, output logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b1, addr: a, wdata: 8'h00};
    #1 d = rdata;
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic knob(bit up, int n);
    for (int i = 0; i < n; i++) begin
      if (up) begin enc_a = 1; repeat (3) @(negedge clk); enc_b = 1; repeat (3) @(negedge clk);
                    enc_a = 0; repeat (3) @(negedge clk); enc_b = 0; repeat (3) @(negedge clk); end
      else    begin enc_b = 1; repeat (3) @(negedge clk); enc_a = 1; repeat (3) @(negedge clk);
                    enc_b = 0; repeat (3) @(negedge clk); enc_a = 0; repeat (3) @(negedge clk); end
    end
  endtask

  int t_cycle = 0, t_a = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && dut.one_gap) t_cycle = cyc;
    if (!rst && timer_out[0]) t_a = cyc;
  end

  initial begin
    logic [7:0] d;
    bus = '0; enc_a = 0; enc_b = 0; pa_in = {8'h33, 8'h22, 8'h11}; pb_in = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    rd(16'hE000, d); check("erased PROM at E000", d, 8'hFF);
    wr(16'h03FF, 8'h42); rd(16'h03FF, d); check("RAM", d, 8'h42);
    // PIAs 0..2 port A inputs, port B outputs
    for (int k = 0; k < 4; k++) begin
      wr(16'h8003 + 16'(4 * k), 8'h00); wr(16'h8002 + 16'(4 * k), 8'hFF);
      wr(16'h8003 + 16'(4 * k), 8'h04); wr(16'h8002 + 16'(4 * k), 8'(8'hE0 + k));
      wr(16'h8001 + 16'(4 * k), 8'h04);
    end
    for (int k = 0; k < 3; k++) begin
      rd(16'h8000 + 16'(4 * k), d); check("PIA port A", d, 8'h11 * (k + 1));
    end
    for (int k = 0; k < 4; k++) check("PIA port B", pb_out[k], 8'hE0 + k);
    // knob
    knob(1, 37);
    rd(16'h800C, d); check("knob up", d, 37);
    knob(0, 50);
    rd(16'h800C, d); check("knob down", d, (37 - 50) & 8'hFF);
    // D/A slots 2, 3
    wr(16'h8020, 8'h12); wr(16'h8021, 8'h30); wr(16'h8032, 8'hFE); wr(16'h8033, 8'hD0);
    check("D/A 0", dac_code[0], 12'h123); check("D/A 3", dac_code[3], 12'hFED);
    // timer slot 4: A preset 60, external clock, external start
    wr(16'h8040, 8'h00); wr(16'h8041, 8'd60); wr(16'h8042, 8'b001);
    // 15 Hz interrupt
    repeat (100) @(negedge clk);
    check("no irq before beam cycle", int'(irq), 0);
    @(negedge clk); gap1 = 1; @(negedge clk); gap1 = 0;
    repeat (150) @(negedge clk);
    check("15 Hz irq", int'(irq), 1);
    rd(16'h8100, d); check("irq latch", d[0], 1);
    wr(16'h8100, 8'h01);
    check("irq cleared", int'(irq), 0);
    check("timer after beam cycle", t_a - t_cycle, 61);
    // ACIA loop, receive interrupt enabled
    wr(16'h8010, 8'h03); wr(16'h8010, 8'h80);
    wr(16'h8011, 8'h6E);
    repeat (300) @(negedge clk);
    check("ACIA irq", int'(irq), 1);
    rd(16'h8011, d); check("ACIA data", d, 8'h6E);
    check("ACIA irq cleared", int'(irq), 0);
    // front panel in slot 15
    rd(16'h80F1, d); check("panel address switches", d, 8'h34);
    rd(16'h80F5, d); check("panel raise button", d, 8'h01);
    wr(16'h80F8, 8'hBE); wr(16'h80F9, 8'hEF);
    check("panel hex display", fp_hex, 16'hBEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
