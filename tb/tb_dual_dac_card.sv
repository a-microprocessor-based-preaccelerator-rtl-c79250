// tb_dual_dac_card: writes random 16-bit settings to both channels and checks
// the 12-bit converter codes (word bits 15:4), that a high-byte write alone
// does not change the output, read-back, channel independence and the zero
// setting after reset.
module tb_dual_dac_card;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic sel;
  logic [7:0] rdata;
  logic [11:0] code_a, code_b;

  dual_dac_card #(.BITS(12)) dut (.*);
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
    logic [15:0] wa, wb, olda;
    bus = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check("reset A", code_a, 0); check("reset B", code_b, 0);
    olda = 0;
    for (int i = 0; i < 30; i++) begin
      wa = 16'($urandom); wb = 16'($urandom);
      wr(4'd0, wa[15:8]);
      check("A unchanged after high byte", code_a, olda[15:4]);
      wr(4'd1, wa[7:0]);
      check("A code", code_a, wa[15:4]);
      wr(4'd2, wb[15:8]); wr(4'd3, wb[7:0]);
      check("B code", code_b, wb[15:4]);
      check("A kept", code_a, wa[15:4]);
      rd(4'd0, d); check("A hi readback", d, wa[15:8]);
      rd(4'd1, d); check("A lo readback", d, {wa[7:4], 4'h0});
      rd(4'd3, d); check("B lo readback", d, {wb[7:4], 4'h0});
      olda = wa;
    end
    // -10 V and +10 V - 1 LSB in the left-adjusted format
    wr(4'd0, 8'h80); wr(4'd1, 8'h00); check("minus full scale", code_a, 12'h800);
    wr(4'd0, 8'h7F); wr(4'd1, 8'hF0); check("plus full scale", code_a, 12'h7FF);
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
