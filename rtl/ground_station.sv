// ground_station: the microprocessor-I/O system at ground potential, serving
// the operator's console and the beam transport line.
//
// Backplane (slot numbers and the RAM size are this design's; the 8K PROM at
// E000-FFFF, eight 1K chips, is the station's program store):
//   memory   8K PROM at E000-FFFF, 1K RAM at 0000-03FF
//   slot 0   binary interface card, four PIAs: display, A/D control/readout,
//            sense switches, keyboard, cursor switch; PIA 3 port A reads the
//            shaft-encoder up/down counter
//   slot 1   ACIA: data light links to and from the dome
//   slot 2,3 dual D/A cards for the beam transport
//   slot 4   dual timer card: beam-transport timing triggers
//   slot 15  chassis front panel (switches, hex display, interrupt latch)
//   8100     control register: bit0 15 Hz interrupt latch (set by the 1-gap,
//            cleared by writing 1), bit1 4-gap seen since reset
// The clock receiver, on the station's 10 MHz PLL clock, gives the ACIA its
// 500 kHz bit clock and the beam-cycle mark. The mark sets the 15 Hz interrupt
// latch, which is the heartbeat of the station software; irq is the OR of that
// latch and the interrupts of the PIAs and the ACIA. A ÷10 of the station
// clock stands for the 1 MHz CPU clock that the timers may count. The CPU is
// outside this module: its bus cycles come in on bus and rdata goes back.
module ground_station
  import pac_pkg::*;
#(
  parameter int unsigned ROM_BYTES = 8192,
  parameter int unsigned RAM_BYTES = 1024,
  parameter string       ROM_FILE  = ""
) (
  input  logic                clk,
  input  logic                rst,
  input  bus_req_t            bus,
  output logic [7:0]          rdata,
  output logic                irq,
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
  // data light links
  output logic                link_tx,
  input  logic                link_rx,
  // console knob
  input  logic                enc_a,
  input  logic                enc_b,
  // binary interface card (PIA 3 port A is the knob counter)
  input  logic [2:0][7:0]     pa_in,
  output logic [3:0][7:0]     pa_out,
  output logic [3:0][7:0]     pa_oe,
  input  logic [3:0][7:0]     pb_in,
  output logic [3:0][7:0]     pb_out,
  output logic [3:0][7:0]     pb_oe,
  input  logic [3:0]          ca1,
  input  logic [3:0]          ca2_in,
  output logic [3:0]          ca2_out,
  output logic [3:0]          ca2_oe,
  input  logic [3:0]          cb1,
  input  logic [3:0]          cb2_in,
  output logic [3:0]          cb2_out,
  output logic [3:0]          cb2_oe,
  // beam transport
  output logic [3:0][11:0]    dac_code,
  output logic [1:0]          timer_out
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

  logic cpu_tick, unused_half, unused_sq;
  pulse_divider #(.N(10)) u_cpuclk (
    .clk(clk), .rst(rst), .en(1'b1), .sync(1'b0),
    .tick(cpu_tick), .half(unused_half), .sq(unused_sq)
  );

  // 15 Hz interrupt latch
  logic irq15, reset_seen;
  always_ff @(posedge clk) begin
    if (rst) begin
      irq15      <= 1'b0;
      reset_seen <= 1'b0;
    end else begin
      if (ctl_sel && is_write(bus) && bus.wdata[0]) irq15 <= 1'b0;
      if (one_gap)  irq15      <= 1'b1;
      if (four_gap) reset_seen <= 1'b1;
    end
  end
  assign ctl_rdata = {6'd0, reset_seen, irq15};

  // slot 0: binary interface card with the knob counter on PIA 3 port A
  logic [7:0]      knob_count;
  logic [3:0][7:0] pa_all;
  logic            bio_irq;
  encoder_counter #(.WIDTH(8)) u_knob (
    .clk(clk), .rst(rst), .enc_a(enc_a), .enc_b(enc_b), .count(knob_count)
  );
  assign pa_all = {knob_count, pa_in};

  binary_io_card #(.N_PIA(4)) u_bio (
    .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[0]), .rdata(slot_rdata[0]),
    .pa_in(pa_all), .pa_out(pa_out), .pa_oe(pa_oe), .pb_in(pb_in), .pb_out(pb_out), .pb_oe(pb_oe),
    .ca1(ca1), .ca2_in(ca2_in), .ca2_out(ca2_out), .ca2_oe(ca2_oe),
    .cb1(cb1), .cb2_in(cb2_in), .cb2_out(cb2_out), .cb2_oe(cb2_oe), .irq(bio_irq)
  );

  // slot 1: ACIA
  logic acia_irq;
  acia u_acia (
    .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[1]), .rdata(slot_rdata[1]),
    .bit_rise(bit_rise), .bit_fall(bit_fall), .txd(link_tx), .rxd(link_rx), .irq(acia_irq)
  );

  // slots 2-3: dual D/A
  for (genvar k = 0; k < 2; k++) begin : g_dac
    dual_dac_card #(.BITS(12)) u_dac (
      .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[2+k]), .rdata(slot_rdata[2+k]),
      .code_a(dac_code[2*k]), .code_b(dac_code[2*k+1])
    );
  end

  // slot 4: dual timer, started by the beam-cycle mark
  dual_timer_card u_timer (
    .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[4]), .rdata(slot_rdata[4]),
    .cpu_tick(cpu_tick), .ext_tick(1'b1), .ext_start({one_gap, one_gap}), .out(timer_out)
  );

  for (genvar s = 5; s < N_SLOTS - 1; s++) begin : g_empty
    assign slot_rdata[s] = 8'h00;
  end


  // slot 15: chassis front panel
  front_panel u_panel (
    .clk(clk), .rst(rst), .bus(bus), .sel(slot_sel[15]), .rdata(slot_rdata[15]),
    .addr_sw(fp_addr_sw), .data_sw(fp_data_sw), .toggle_sw(fp_toggle_sw),
    .raise_btn(fp_raise), .lower_btn(fp_lower), .intr_btn(fp_intr),
    .hex_display(fp_hex), .leds(fp_leds)
  );

  assign irq = irq15 || bio_irq || acia_irq;
endmodule
