// memory_card: program PROM and data RAM of a station.
//
// The PROM is built from 1K-byte UV-erasable chips (2708) holding the station
// program; ROM_BYTES is 1024 in the high-voltage terminal and 8192 (eight
// chips) at the ground station. Its contents are loaded from ROM_FILE (hex, one
// byte per line) when given; otherwise it reads 0xFF, the erased state. Writes
// to the PROM are ignored. The RAM is read/write. Both read combinationally in
// the bus cycle; a RAM write takes effect at the clock edge of the cycle.
// rom_sel and ram_sel come from the station address decoder; the low address
// bits index the arrays.
module memory_card
  import pac_pkg::*;
#(
  parameter int unsigned ROM_BYTES = 1024,
  parameter int unsigned RAM_BYTES = 1024,
  parameter string       ROM_FILE  = ""
) (
  input  logic       clk,
  input  bus_req_t   bus,
  input  logic       rom_sel,
  input  logic       ram_sel,
  output logic [7:0] rdata
);
  localparam int unsigned RW = $clog2(ROM_BYTES);
  localparam int unsigned MW = $clog2(RAM_BYTES);

  logic [7:0] rom [ROM_BYTES];
  logic [7:0] ram [RAM_BYTES];

  initial begin
    for (int i = 0; i < int'(ROM_BYTES); i++) rom[i] = 8'hFF;
    if (ROM_FILE != "") $readmemh(ROM_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (ram_sel && is_write(bus))
      ram[bus.addr[MW-1:0]] <= bus.wdata;
  end

  always_comb begin
    if (rom_sel)      rdata = rom[bus.addr[RW-1:0]];
    else if (ram_sel) rdata = ram[bus.addr[MW-1:0]];
    else              rdata = 8'h00;
  end
endmodule
