// tb_relay_io_card: writes random relay patterns and checks the relay outputs
// and their read-back; applies random contact patterns and checks the status
// read, which must show them two clocks later; relays are off after reset.
module tb_relay_io_card;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic sel;
  logic [7:0] rdata, relay_out, status_in;

  relay_io_card #(.WIDTH(8)) dut (.*);
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
    logic [7:0] d, o, s;
    bus = '0; status_in = 8'h00;
    repeat (3) @(negedge clk);
    rst = 0;
    check("relays off after reset", relay_out, 0);
    for (int i = 0; i < 30; i++) begin
      o = 8'($urandom); s = 8'($urandom);
      wr(4'd0, o);
      check("relay out", relay_out, o);
      rd(4'd0, d); check("relay readback", d, o);
      status_in = s;
      repeat (2) @(negedge clk);
      rd(4'd1, d); check("status", d, s);
      wr(4'd1, ~o);
      check("write to status ignored", relay_out, o);
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
