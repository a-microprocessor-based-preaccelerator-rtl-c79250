// tb_station_bus: sweeps addresses and checks the decoder against the address
// map (RAM, sixteen I/O slots, control register, PROM) and that the read
// multiplexer returns the byte of the selected source.
module tb_station_bus;
  import pac_pkg::*;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic [15:0] slot_sel;
  logic rom_sel, ram_sel, ctl_sel;
  logic [15:0][7:0] slot_rdata;
  logic [7:0] mem_rdata, ctl_rdata, rdata;

  station_bus #(.ROM_BYTES(8192), .RAM_BYTES(1024)) dut (.*);

  task automatic check(string what, int a, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s @%h: got %h exp %h", what, a, got, exp); end
  endtask

  initial begin
    for (int s = 0; s < 16; s++) slot_rdata[s] = 8'(8'h40 + s);
    mem_rdata = 8'hEE; ctl_rdata = 8'hCC;
    bus = '0;
    for (int i = 0; i < 4000; i++) begin
      int a;
      logic [15:0] exp_slot;
      logic [7:0] exp_rd;
      case (i % 5)
        0: a = $urandom % 16'h0500;
        1: a = 16'h8000 + ($urandom % 16'h0110);
        2: a = 16'hDF00 + ($urandom % 16'h2100);
        default: a = $urandom % 65536;
      endcase
      bus.addr = 16'(a);
      #1;
      exp_slot = '0;
      if (a >= 'h8000 && a < 'h8100) exp_slot[(a >> 4) & 15] = 1'b1;
      if (a >= 'hE000 || a < 'h0400) exp_rd = 8'hEE;
      else if (a == 'h8100) exp_rd = 8'hCC;
      else if (exp_slot != 0) exp_rd = 8'(8'h40 + ((a >> 4) & 15));
      else exp_rd = 8'h00;
      check("slot_sel", a, slot_sel, exp_slot);
      check("rom_sel", a, int'(rom_sel), int'(a >= 'hE000));
      check("ram_sel", a, int'(ram_sel), int'(a < 'h0400));
      check("ctl_sel", a, int'(ctl_sel), int'(a == 'h8100));
      check("rdata", a, rdata, exp_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
