// tb_pia: programs the PIA as the software would. Checks the direction
// registers (mixed input/output bits on a port read back as output register
// or pin per bit), port outputs, C1 edge flags for both edge polarities, their
// interrupt enables and clear-on-read, C2 as input (flag) and as output level.
module tb_pia;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic sel;
  logic [7:0] rdata, pa_in, pa_out, pa_oe, pb_in, pb_out, pb_oe;
  logic ca1, ca2_in, ca2_out, ca2_oe, cb1, cb2_in, cb2_out, cb2_oe, irqa, irqb;

  pia dut (.*);
  assign sel = bus.vma;

  task automatic wr(logic [1:0] a, logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b0, addr: {14'h0, a}, wdata: d};
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic rd(logic [1:0] a, output logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b1, addr: {14'h0, a}, wdata: 8'h00};
    #1 d = rdata;
    @(negedge clk);
    bus.vma = 1'b0;
  endtask
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [7:0] d, ddr, o, pin;
    bus = '0; pa_in = 0; pb_in = 0; ca1 = 0; ca2_in = 0; cb1 = 1; cb2_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    rd(2'd1, d); check("CRA after reset", d, 0);
    for (int i = 0; i < 20; i++) begin
      ddr = 8'($urandom); o = 8'($urandom); pin = 8'($urandom);
      wr(2'd1, 8'h00); wr(2'd0, ddr);           // DDRA
      rd(2'd0, d); check("DDRA readback", d, ddr);
      wr(2'd1, 8'h04); wr(2'd0, o);             // data
      pa_in = pin;
      rd(2'd0, d); check("port A read", d, (o & ddr) | (pin & ~ddr));
      check("pa_out", pa_out, o); check("pa_oe", pa_oe, ddr);
    end
    // port B, all outputs
    wr(2'd3, 8'h00); wr(2'd2, 8'hFF); wr(2'd3, 8'h04); wr(2'd2, 8'hA5);
    check("pb_out", pb_out, 8'hA5); check("pb_oe", pb_oe, 8'hFF);
    // CA1 rising edge, interrupt enabled
    wr(2'd1, 8'h07);
    ca1 = 1; repeat (5) @(negedge clk);
    rd(2'd1, d); check("CA1 flag", d[7], 1); check("irqa", int'(irqa), 1);
    rd(2'd0, d);
    rd(2'd1, d); check("CA1 flag cleared by data read", d[7], 0); check("irqa low", int'(irqa), 0);
    ca1 = 0; repeat (5) @(negedge clk);
    rd(2'd1, d); check("CA1 falling edge ignored", d[7], 0);
    // CB1 falling edge active (bit1 = 0), interrupt disabled: flag only
    wr(2'd3, 8'h04);
    cb1 = 0; repeat (5) @(negedge clk);
    rd(2'd3, d); check("CB1 falling flag", d[7], 1); check("irqb off", int'(irqb), 0);
    // CA2 input, rising edge, interrupt enabled
    wr(2'd1, 8'h1C);
    ca2_in = 1; repeat (5) @(negedge clk);
    rd(2'd1, d); check("CA2 flag", d[6], 1); check("irqa by CA2", int'(irqa), 1);
    check("CA2 is input", int'(ca2_oe), 0);
    // CB2 output, level from bit 3
    wr(2'd3, 8'h3C); check("CB2 out high", int'(cb2_out), 1); check("CB2 oe", int'(cb2_oe), 1);
    wr(2'd3, 8'h34); check("CB2 out low", int'(cb2_out), 0);
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
