// dome_station: the microprocessor-I/O system in the high-voltage terminal.
//
// It controls and monitors the ion-source electronics. Its backplane carries
// the card set of the terminal block diagram (slot numbers are this design's):
//   memory   1K PROM at FC00-FFFF, 1K RAM at 0000-03FF
//   slot 0   PIA: 16-channel A/D control/readout and spare I/O
//   slot 1   dual D/A: ARC MOD. VOLTAGE (A), EXTR. VOLTAGE (B)
//   slot 2   dual D/A: FIL. CURRENT (A), MAG. CURRENT (B)
//   slot 3   dual D/A: NEG. CUP BIAS (A), POS. CUP BIAS (B)
//   slot 4   dual D/A: Pd. LEAK CURRENT (A), spare (B)
//   slot 5   ACIA: data light links to and from the ground station
//   slot 8   relay I/O: power-supply ON/OFF control     (expansion crate)
//   slot 9   relay I/O: power-supply status
//   slot 10  relay I/O: over/under-current status
//   slot 11  dual timer: CUP ON (A), CUP PULSE WIDTH (B)
//   slot 12  dual timer: ARC SAMPLE TIME (A), ARC CURRENT ON (B)
//   slot 15  chassis front panel: hex display, address/data switches,
//            toggle switches, LEDs, raise/lower buttons
//   8100     control register: bit0 beam-cycle flag (set by the 1-gap, cleared
//            by writing 1), bit1 4-gap seen since reset
// The clock receiver, on the 10 MHz PLL clock, gives the ACIA its 500 kHz
// bit clock, starts the timers at each beam cycle (1-gap) and turns a 4-gap
// into a one-clock reset pulse for the dome CPU. The dome uses no interrupts:
// the CPU polls the ACIA and the cycle flag. A ÷10 of the station clock stands
// for the 1 MHz CPU clock that the timers may count. The CPU itself is outside
// this module: its bus cycles come in on bus and rdata goes back.
module dome_station
  import pac_pkg::*;
#(
  parameter int unsigned ROM_BYTES = 1024,
  parameter int unsigned RAM_BYTES = 1024,
  parameter string       ROM_FILE  = ""
) (
  input  logic                clk,
  input  logic                rst,
  input  bus_req_t            bus,
  output logic [7:0]          rdata,
  output logic                cpu_reset,
  // chassis front panel
  input  logic [15:0]         fp_addr_sw,
  input  logic [15:0]         fp_data_sw,
  input  logic [7:0]          fp_toggle_sw,
  input  logic                fp_raise,
  input  logic                fp_lower,
  input  logic                fp_intr,
  output logic [15:0]         fp_hex,
  output logic [7:0]          fp_leds,
  // timing link
  input  logic                timing_rx,
  output logic                div20_fb,
  output logic                beam_cycle,
  // data light links
  output logic                link_tx,
  input  logic                link_rx,
  // PIA
  input  logic [7:0]          pa_in,
  output logic [7:0]          pa_out,
  output logic [7:0]          pa_oe,
  input  logic [7:0]          pb_in,
  output logic [7:0]          pb_out,
  output logic [7:0]          pb_oe,
  input  logic                ca1,
  input  logic                ca2_in,
  output logic                ca2_out,
  output logic                ca2_oe,
  input  logic                cb1,
  input  logic                cb2_in,
  output logic                cb2_out,
  output logic                cb2_oe,
  // converters and relays
  output logic [7:0][11:0]    dac_code,
  output logic [2:0][7:0]     relay_out,
  input  logic [2:0][7:0]     relay_in,
  output logic [3:0]          timer_out
);
  logic [N_SLOTS-1:0]      slot_sel;
  logic [N_SLOTS-1:0][7:0] slot_rdata;
  logic                    rom_sel, ram_sel, ctl_sel;
  logic [7:0]              mem_rdata, ctl_rdata;

  station_bus #(.ROM_BYTES(ROM_BYTES), .RAM_BYTES(RAM_BYTES)) u_bus (
    .bus(bus), .slot_sel(slot_sel), .rom_sel(rom_sel), .ram_sel(ram_sel), .ctl_sel(ctl_sel),
    .slot_rdata(slot_rdata), .mem_rdata(mem_rdata), .ctl_rdata(ctl_rdata), .rdata(rdata)
  );

  memory_card #(.ROM_BYTES(ROM_BYTES), .RAM_BYTES(RAM_BYTES), .ROM_FILE(ROM_FILE)) u_mem (
    .clk(clk), .bus(bus), .rom_sel(rom_sel), .ram_sel(ram_sel), .rdata(mem_rdata)
  );

  // timing
  logic ungapped, bit_rise, bit_fall, one_gap, four_gap;
  clock_receiver u_clkrx (
    .clk(clk), .rst(rst), .train_in(timing_rx), .ungapped(ungapped), .div20_fb(div20_fb),
    .bit_rise(bit_rise), .bit_fall(bit_fall), .one_gap(one_gap), .four_gap(four_gap)
  );
  assign cpu_reset  = four_gap;
  assign beam_cycle = one_gap;

  logic cpu_tick, unused_half, unused_sq;
  pulse_divider #(.N(10)) u_cpuclk (
    .clk(clk), .rst(rst), .en(1'b1), .sync(1'b0),
    .tick(cpu_tick), .half(unused_half), .sq(unused_sq)
  );

  // station control register
  logic cycle_flag, reset_seen;
  always_ff @(posedge clk) begin
    if (rst) begin
      cycle_flag <= 1'b0;
      reset_seen <= 1'b0;
    end else begin
      if (ctl_sel && is_write(bus) && bus.wdata[0]) cycle_flag <= 1'b0;
      if (one_gap)  cycle_flag <= 1'b1;
      if (four_gap) reset_seen <= 1'b1;
    end
  end
  assign ctl_rdata = {6'd0, reset_seen, cycle_flag};

  // slot 0: PIA
  logic irqa_unused, irqb_unused;
  pia u_pia (
    .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[0]), .rdata(slot_rdata[0]),
    .pa_in(pa_in), .pa_out(pa_out), .pa_oe(pa_oe), .pb_in(pb_in), .pb_out(pb_out), .pb_oe(pb_oe),
    .ca1(ca1), .ca2_in(ca2_in), .ca2_out(ca2_out), .ca2_oe(ca2_oe),
    .cb1(cb1), .cb2_in(cb2_in), .cb2_out(cb2_out), .cb2_oe(cb2_oe),
    .irqa(irqa_unused), .irqb(irqb_unused)
  );

  // slots 1-4: dual D/A
  for (genvar k = 0; k < 4; k++) begin : g_dac
    dual_dac_card #(.BITS(12)) u_dac (
      .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[1+k]), .rdata(slot_rdata[1+k]),
      .code_a(dac_code[2*k]), .code_b(dac_code[2*k+1])
    );
  end

  // slot 5: ACIA
  logic acia_irq_unused;
  acia u_acia (
    .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[5]), .rdata(slot_rdata[5]),
    .bit_rise(bit_rise), .bit_fall(bit_fall), .txd(link_tx), .rxd(link_rx), .irq(acia_irq_unused)
  );

  // slots 8-10: relay I/O
  for (genvar k = 0; k < 3; k++) begin : g_relay
    relay_io_card #(.WIDTH(8)) u_relay (
      .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[8+k]), .rdata(slot_rdata[8+k]),
      .relay_out(relay_out[k]), .status_in(relay_in[k])
    );
  end

  // slots 11-12: dual timers, started by the beam-cycle mark
  for (genvar k = 0; k < 2; k++) begin : g_timer
    dual_timer_card u_timer (
      .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[11+k]), .rdata(slot_rdata[11+k]),
      .cpu_tick(cpu_tick), .ext_tick(1'b1), .ext_start({one_gap, one_gap}),
      .out(timer_out[2*k +: 2])
    );
  end


  // slot 15: chassis front panel
  front_panel u_panel (
    .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[15]), .rdata(slot_rdata[15]),
    .addr_sw(fp_addr_sw), .data_sw(fp_data_sw), .toggle_sw(fp_toggle_sw),
    .raise_btn(fp_raise), .lower_btn(fp_lower), .intr_btn(fp_intr),
    .hex_display(fp_hex), .leds(fp_leds)
  );

  assign slot_rdata[6]  = 8'h00;
  assign slot_rdata[7]  = 8'h00;
  assign slot_rdata[13] = 8'h00;
  assign slot_rdata[14] = 8'h00;
endmodule
