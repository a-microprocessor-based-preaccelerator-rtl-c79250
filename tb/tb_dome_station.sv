// tb_dome_station: runs the terminal card file from a bus-master model with a
// model timing train. Checks: RAM and erased PROM, each of the eight D/A
// outputs at its slot, the relay output and status cards, the PIA, a byte sent
// and received by the ACIA over a looped-back link, the beam-cycle flag and
// the timers started by the 1-gap (channel B chained to A), and the CPU reset
// pulse from a 4-gap, and the front-panel switches, raise button and hex
// display in slot 15.
module tb_dome_station;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;

  bus_req_t bus;
  logic [7:0] rdata;
  logic cpu_reset, timing_rx, div20_fb, beam_cycle, link_tx;
  logic [7:0] pa_in, pa_out, pa_oe, pb_in, pb_out, pb_oe;
  logic ca2_out, ca2_oe, cb2_out, cb2_oe;
  logic [7:0][11:0] dac_code;
  logic [2:0][7:0] relay_out, relay_in;
  logic [3:0] timer_out;
  logic gap1 = 0, gap4 = 0;
  logic [15:0] fp_addr_sw = 16'h1234, fp_data_sw = 16'h0310, fp_hex;
  logic [7:0] fp_toggle_sw = 8'h81, fp_leds;
  logic fp_raise = 1, fp_lower = 0, fp_intr = 0;

  tb_train_gen u_gen (.clk, .gap1, .gap4, .train(timing_rx));

  dome_station dut (
    .clk, .rst, .bus, .rdata,
    .fp_addr_sw, .fp_data_sw, .fp_toggle_sw, .fp_raise, .fp_lower, .fp_intr, .fp_hex, .fp_leds, .cpu_reset, .timing_rx, .div20_fb, .beam_cycle,
    .link_tx, .link_rx(link_tx),
    .pa_in, .pa_out, .pa_oe, .pb_in, .pb_out, .pb_oe,
    .ca1(1'b0), .ca2_in(1'b0), .ca2_out, .ca2_oe, .cb1(1'b0), .cb2_in(1'b0), .cb2_out, .cb2_oe,
    .dac_code, .relay_out, .relay_in, .timer_out
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

  int n_reset = 0, n_cycle = 0, t_cycle = 0, t_a = 0, t_b = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && cpu_reset)  n_reset++;
    if (!rst && beam_cycle) begin n_cycle++; t_cycle = cyc; end
    if (timer_out[0]) t_a = cyc;
    if (timer_out[1]) t_b = cyc;
  end

  initial begin
    logic [7:0] d;
    bus = '0; pa_in = 8'h5C; pb_in = 0; relay_in = {8'h33, 8'h22, 8'h11};
    repeat (4) @(negedge clk);
    rst = 0;
    // memory
    wr(16'h0123, 8'h9A); rd(16'h0123, d); check("RAM", d, 8'h9A);
    rd(16'hFC10, d); check("erased PROM", d, 8'hFF);
    // D/A: slot 1..4, channel A at +0/+1, B at +2/+3
    for (int k = 0; k < 4; k++) begin
      wr(16'h8010 + 16'(16 * k), 8'(8'h10 + k)); wr(16'h8011 + 16'(16 * k), 8'h50);
      wr(16'h8012 + 16'(16 * k), 8'(8'h90 + k)); wr(16'h8013 + 16'(16 * k), 8'hA0);
    end
    for (int k = 0; k < 4; k++) begin
      check("D/A A", dac_code[2 * k],     {8'(8'h10 + k), 4'h5});
      check("D/A B", dac_code[2 * k + 1], {8'(8'h90 + k), 4'hA});
    end
    // relays
    wr(16'h8080, 8'hC1); check("ON/OFF relays", relay_out[0], 8'hC1);
    repeat (3) @(negedge clk);
    rd(16'h8091, d); check("PS status", d, 8'h22);
    rd(16'h80A1, d); check("over/under status", d, 8'h33);
    // PIA port A as input
    wr(16'h8001, 8'h04); rd(16'h8000, d); check("PIA port A", d, 8'h5C);
    // ACIA looped back
    wr(16'h8050, 8'h03); wr(16'h8050, 8'h00);
    repeat (100) @(negedge clk);               // let the clock receiver lock
    wr(16'h8051, 8'hB7);
    repeat (300) @(negedge clk);
    rd(16'h8050, d); check("ACIA RDRF", d[ST_RDRF], 1); check("ACIA no error", int'(d[ST_FE] | d[ST_PE]), 0);
    rd(16'h8051, d); check("ACIA loop data", d, 8'hB7);
    // timers: slot 11, A preset 40 external clock, external start; B 25 chained
    wr(16'h80B0, 8'h00); wr(16'h80B1, 8'd40); wr(16'h80B2, 8'b001);
    wr(16'h80B8, 8'h00); wr(16'h80B9, 8'd25); wr(16'h80BA, 8'b101);
    @(negedge clk); gap1 = 1; @(negedge clk); gap1 = 0;
    repeat (200) @(negedge clk);
    check("beam cycles", n_cycle, 1);
    check("timer A after beam cycle", t_a - t_cycle, 41);
    check("timer B chained", t_b - t_a, 26);
    rd(16'h8100, d); check("cycle flag", d[0], 1);
    wr(16'h8100, 8'h01); rd(16'h8100, d); check("cycle flag cleared", d[0], 0);
    check("no CPU reset yet", n_reset, 0);
    @(negedge clk); gap4 = 1; @(negedge clk); gap4 = 0;
    repeat (200) @(negedge clk);
    check("CPU reset from 4-gap", n_reset, 1);
    check("no beam cycle from 4-gap", n_cycle, 1);
    rd(16'h8100, d); check("4-gap flag", d[1], 1);
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
