// station_bus: backplane address decoder and read-data selector of one
// station's card file. The CPU reaches every card as memory, so one decoder
// gives each card its select and one multiplexer returns the selected card's
// byte.
//
// Address map (this design's own except the ground PROM range E000-FFFF):
//   0000 .. RAM_BYTES-1        RAM
//   8000 + 16*s, s = 0..15     I/O slot s (cards 8..15 sit in the expansion crate)
//   8100                       station control register
//   10000-ROM_BYTES .. FFFF    PROM
// Unused addresses read 0x00. Purely combinational.
module station_bus
  import pac_pkg::*;
#(
  parameter int unsigned ROM_BYTES = 1024,
  parameter int unsigned RAM_BYTES = 1024
) (
  input  bus_req_t               bus,
  output logic [N_SLOTS-1:0]     slot_sel,
  output logic                   rom_sel,
  output logic                   ram_sel,
  output logic                   ctl_sel,
  input  logic [N_SLOTS-1:0][7:0] slot_rdata,
  input  logic [7:0]             mem_rdata,
  input  logic [7:0]             ctl_rdata,
  output logic [7:0]             rdata
);
  localparam logic [16:0] ROM_START = 17'h10000 - 17'(ROM_BYTES);

  always_comb begin
    slot_sel = '0;
    rom_sel  = 17'(bus.addr) >= ROM_START;
    ram_sel  = 17'(bus.addr) < 17'(RAM_BYTES);
    ctl_sel  = bus.addr == CTL_ADDR;
    if (bus.addr[15:8] == IO_BASE[15:8])
      slot_sel[bus.addr[7:4]] = 1'b1;

    if (rom_sel || ram_sel) rdata = mem_rdata;
    else if (ctl_sel)       rdata = ctl_rdata;
    else if (|slot_sel)     rdata = slot_rdata[bus.addr[7:4]];
    else                    rdata = 8'h00;
  end

  initial assert (ROM_BYTES + RAM_BYTES <= 32768) else $error("station_bus: memory overlaps I/O");
endmodule
