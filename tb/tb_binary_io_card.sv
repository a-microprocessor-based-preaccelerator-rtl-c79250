// tb_binary_io_card: writes a different output byte to port A and port B of
// each of the four PIAs, reads pins through each, and checks that every PIA
// answers only at its own offset and that a CA1 interrupt of any PIA reaches
// the card's irq.
module tb_binary_io_card;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic sel;
  logic [7:0] rdata;
  logic [3:0][7:0] pa_in, pa_out, pa_oe, pb_in, pb_out, pb_oe;
  logic [3:0] ca1, ca2_in, ca2_out, ca2_oe, cb1, cb2_in, cb2_out, cb2_oe;
  logic irq;

  binary_io_card #(.N_PIA(4)) dut (.*);
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
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [7:0] d;
    bus = '0; pa_in = '0; pb_in = '0; ca1 = '0; ca2_in = '0; cb1 = '0; cb2_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 4; k++) begin
      wr(4'(4*k + 2), 8'hFF);               // DDRB all out
      wr(4'(4*k + 3), 8'h04);
      wr(4'(4*k + 2), 8'(8'h10 * k + 3));
      wr(4'(4*k + 1), 8'h04);               // port A inputs
    end
    for (int k = 0; k < 4; k++) begin
      check("pb_out", pb_out[k], 8'h10 * k + 3);
      check("pb_oe", pb_oe[k], 8'hFF);
      check("pa_oe", pa_oe[k], 8'h00);
      pa_in[k] = 8'(8'hA0 + k);
    end
    for (int k = 0; k < 4; k++) begin
      rd(4'(4*k), d);     check("port A pins", d, 8'hA0 + k);
      rd(4'(4*k + 2), d); check("port B readback", d, 8'h10 * k + 3);
    end
    check("no irq", int'(irq), 0);
    wr(4'd9, 8'h07);                         // PIA 2: CA1 rising, enabled
    ca1[2] = 1; repeat (5) @(negedge clk);
    check("irq from PIA 2", int'(irq), 1);
    rd(4'd1, d); check("PIA 0 flag clear", d[7], 0);
    rd(4'd9, d); check("PIA 2 flag set", d[7], 1);
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
