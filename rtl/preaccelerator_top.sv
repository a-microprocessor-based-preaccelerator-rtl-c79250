// preaccelerator_top: the complete preaccelerator control system.
//
// Two microprocessor-I/O stations, one at ground potential (operator's
// console, beam transport) and one in the high-voltage terminal (ion-source
// electronics), exchange data over two serial fiber-optic links and share one
// timing system. The timing transmitter at the ground station divides a 1 MHz
// crystal to a 500 kHz pulse train and removes one pulse at each 15 Hz beam
// cycle (60 Hz line ÷4) and four pulses on RESET; a clock receiver at each
// station multiplies the train by 20 with a PLL to the 10 MHz timer time base,
// recovers an ungapped 500 kHz for the ACIAs and detects the gaps.
//
// The optical links, the PLL oscillators, the CPUs and the analog front ends
// are outside this module, so their electrical sides are ports: the gapped
// train leaves on timing_tx and comes back per station on timing_rx_*; each
// station's serial data leaves on *_link_tx and arrives on *_link_rx; each
// station runs on its own PLL output clock (clk_gnd, clk_dome) and returns the
// ÷20 feedback (*_div20_fb) for the PLL's phase detector; each CPU drives its
// station's bus; each chassis front panel (switches, buttons, hex display,
// LEDs) is brought out as gnd_fp_* and dome_fp_*. rst_n is an active-low power-on reset, sampled synchronously
// in each clock domain.
module preaccelerator_top
  import pac_pkg::*;
(
  input  logic             clk_1mhz,
  input  logic             clk_gnd,
  input  logic             clk_dome,
  input  logic             rst_n,
  // timing system
  input  logic             zero_cross,
  input  logic             reset_dome_req,
  output logic             timing_tx,
  input  logic             timing_rx_gnd,
  input  logic             timing_rx_dome,
  output logic             gnd_div20_fb,
  output logic             dome_div20_fb,
  // data light links
  output logic             gnd_link_tx,
  input  logic             gnd_link_rx,
  output logic             dome_link_tx,
  input  logic             dome_link_rx,
  // ground station
  input  logic [15:0]      gnd_fp_addr_sw,
  input  logic [15:0]      gnd_fp_data_sw,
  input  logic [7:0]       gnd_fp_toggle_sw,
  input  logic             gnd_fp_raise,
  input  logic             gnd_fp_lower,
  input  logic             gnd_fp_intr,
  output logic [15:0]      gnd_fp_hex,
  output logic [7:0]       gnd_fp_leds,
  input  bus_req_t         gnd_bus,
  output logic [7:0]       gnd_rdata,
  output logic             gnd_irq,
  input  logic             enc_a,
  input  logic             enc_b,
  input  logic [2:0][7:0]  gnd_pa_in,
  output logic [3:0][7:0]  gnd_pa_out,
  output logic [3:0][7:0]  gnd_pa_oe,
  input  logic [3:0][7:0]  gnd_pb_in,
  output logic [3:0][7:0]  gnd_pb_out,
  output logic [3:0][7:0]  gnd_pb_oe,
  input  logic [3:0]       gnd_ca1,
  input  logic [3:0]       gnd_ca2_in,
  output logic [3:0]       gnd_ca2_out,
  output logic [3:0]       gnd_ca2_oe,
  input  logic [3:0]       gnd_cb1,
  input  logic [3:0]       gnd_cb2_in,
  output logic [3:0]       gnd_cb2_out,
  output logic [3:0]       gnd_cb2_oe,
  output logic [3:0][11:0] gnd_dac_code,
  output logic [1:0]       gnd_timer_out,
  // dome station
  input  logic [15:0]      dome_fp_addr_sw,
  input  logic [15:0]      dome_fp_data_sw,
  input  logic [7:0]       dome_fp_toggle_sw,
  input  logic             dome_fp_raise,
  input  logic             dome_fp_lower,
  input  logic             dome_fp_intr,
  output logic [15:0]      dome_fp_hex,
  output logic [7:0]       dome_fp_leds,
  input  bus_req_t         dome_bus,
  output logic [7:0]       dome_rdata,
  output logic             dome_cpu_reset,
  output logic             dome_beam_cycle,
  input  logic [7:0]       dome_pa_in,
  output logic [7:0]       dome_pa_out,
  output logic [7:0]       dome_pa_oe,
  input  logic [7:0]       dome_pb_in,
  output logic [7:0]       dome_pb_out,
  output logic [7:0]       dome_pb_oe,
  input  logic             dome_ca1,
  input  logic             dome_ca2_in,
  output logic             dome_ca2_out,
  output logic             dome_ca2_oe,
  input  logic             dome_cb1,
  input  logic             dome_cb2_in,
  output logic             dome_cb2_out,
  output logic             dome_cb2_oe,
  output logic [7:0][11:0] dome_dac_code,
  output logic [2:0][7:0]  dome_relay_out,
  input  logic [2:0][7:0]  dome_relay_in,
  output logic [3:0]       dome_timer_out
);
  logic rst_1m, rst_gnd, rst_dome;

  always_ff @(posedge clk_1mhz) rst_1m   <= !rst_n;
  always_ff @(posedge clk_gnd)  rst_gnd  <= !rst_n;
  always_ff @(posedge clk_dome) rst_dome <= !rst_n;

  timing_transmitter #(.LINE_DIV(4)) u_timing (
    .clk_1mhz(clk_1mhz), .rst(rst_1m), .zero_cross(zero_cross),
    .reset_req(reset_dome_req), .pulse_train(timing_tx)
  );

  ground_station u_gnd (
    .clk(clk_gnd), .rst(rst_gnd), .bus(gnd_bus), .rdata(gnd_rdata), .irq(gnd_irq),
    .fp_addr_sw(gnd_fp_addr_sw), .fp_data_sw(gnd_fp_data_sw), .fp_toggle_sw(gnd_fp_toggle_sw),
    .fp_raise(gnd_fp_raise), .fp_lower(gnd_fp_lower), .fp_intr(gnd_fp_intr),
    .fp_hex(gnd_fp_hex), .fp_leds(gnd_fp_leds),
    .timing_rx(timing_rx_gnd), .div20_fb(gnd_div20_fb),
    .link_tx(gnd_link_tx), .link_rx(gnd_link_rx),
    .enc_a(enc_a), .enc_b(enc_b),
    .pa_in(gnd_pa_in), .pa_out(gnd_pa_out), .pa_oe(gnd_pa_oe),
    .pb_in(gnd_pb_in), .pb_out(gnd_pb_out), .pb_oe(gnd_pb_oe),
    .ca1(gnd_ca1), .ca2_in(gnd_ca2_in), .ca2_out(gnd_ca2_out), .ca2_oe(gnd_ca2_oe),
    .cb1(gnd_cb1), .cb2_in(gnd_cb2_in), .cb2_out(gnd_cb2_out), .cb2_oe(gnd_cb2_oe),
    .dac_code(gnd_dac_code), .timer_out(gnd_timer_out)
  );

  dome_station u_dome (
    .clk(clk_dome), .rst(rst_dome), .bus(dome_bus), .rdata(dome_rdata),
    .fp_addr_sw(dome_fp_addr_sw), .fp_data_sw(dome_fp_data_sw), .fp_toggle_sw(dome_fp_toggle_sw),
    .fp_raise(dome_fp_raise), .fp_lower(dome_fp_lower), .fp_intr(dome_fp_intr),
    .fp_hex(dome_fp_hex), .fp_leds(dome_fp_leds),
    .cpu_reset(dome_cpu_reset), .timing_rx(timing_rx_dome), .div20_fb(dome_div20_fb),
    .beam_cycle(dome_beam_cycle),
    .link_tx(dome_link_tx), .link_rx(dome_link_rx),
    .pa_in(dome_pa_in), .pa_out(dome_pa_out), .pa_oe(dome_pa_oe),
    .pb_in(dome_pb_in), .pb_out(dome_pb_out), .pb_oe(dome_pb_oe),
    .ca1(dome_ca1), .ca2_in(dome_ca2_in), .ca2_out(dome_ca2_out), .ca2_oe(dome_ca2_oe),
    .cb1(dome_cb1), .cb2_in(dome_cb2_in), .cb2_out(dome_cb2_out), .cb2_oe(dome_cb2_oe),
    .dac_code(dome_dac_code), .relay_out(dome_relay_out), .relay_in(dome_relay_in),
    .timer_out(dome_timer_out)
  );
endmodule
