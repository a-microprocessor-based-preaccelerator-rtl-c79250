// tb_memory_card: a 1K PROM loaded with a 64-byte test image (byte i holds
// (7*i + 3) mod 256; the rest reads FF, the erased value) and 1K of RAM.
// Checks PROM contents, that PROM writes are ignored, and RAM write/read at
// random addresses against a model array.
module tb_memory_card;
  import pac_pkg::*;
  logic clk = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic rom_sel, ram_sel;
  logic [7:0] rdata;

  memory_card #(.ROM_BYTES(1024), .RAM_BYTES(1024), .ROM_FILE("tb/prom_test.hex")) dut (.*);

  assign rom_sel = bus.addr >= 16'hFC00;
  assign ram_sel = bus.addr < 16'h0400;

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

  logic [7:0] model [1024];
  initial begin
    logic [7:0] d;
    int a;
    bus = '0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 70; i++) begin
      rd(16'hFC00 + 16'(i), d);
      check("PROM", d, i < 64 ? ((7 * i + 3) & 8'hFF) : 8'hFF);
    end
    wr(16'hFC05, 8'h00);
    rd(16'hFC05, d); check("PROM write ignored", d, (7 * 5 + 3));
    for (int i = 0; i < 1024; i++) begin
      model[i] = 8'($urandom);
      wr(16'(i), model[i]);
    end
    for (int i = 0; i < 300; i++) begin
      a = $urandom % 1024;
      rd(16'(a), d); check("RAM", d, model[a]);
    end
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
