// binary_io_card: the ground station's binary interface card, four PIAs on one
// backplane card. Through them the CPU positions the display cursor and writes
// the display, controls and reads the 16-channel A/D converter, and reads the
// console sense switches, the 16-key keyboard, the vertical cursor switch and
// the shaft-encoder up/down counter.
//
// PIA k occupies card offsets 4k..4k+3 (addr[3:2] picks the PIA); each PIA
// keeps its own register layout. All PIA lines are brought out, indexed by
// PIA; which console device is wired to which line is decided outside the card.
// irq is the OR of the eight PIA interrupt outputs. Timing is that of the PIA.
module binary_io_card
  import pac_pkg::*;
#(
  parameter int unsigned N_PIA = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  bus_req_t              bus,
  input  logic                  sel,
  output logic [7:0]            rdata,
  input  logic [N_PIA-1:0][7:0] pa_in,
  output logic [N_PIA-1:0][7:0] pa_out,
  output logic [N_PIA-1:0][7:0] pa_oe,
  input  logic [N_PIA-1:0][7:0] pb_in,
  output logic [N_PIA-1:0][7:0] pb_out,
  output logic [N_PIA-1:0][7:0] pb_oe,
  input  logic [N_PIA-1:0]      ca1,
  input  logic [N_PIA-1:0]      ca2_in,
  output logic [N_PIA-1:0]      ca2_out,
  output logic [N_PIA-1:0]      ca2_oe,
  input  logic [N_PIA-1:0]      cb1,
  input  logic [N_PIA-1:0]      cb2_in,
  output logic [N_PIA-1:0]      cb2_out,
  output logic [N_PIA-1:0]      cb2_oe,
  output logic                  irq
);
  logic [N_PIA-1:0][7:0] pia_rdata;
  logic [N_PIA-1:0]      irqa, irqb;
  logic [1:0]            which;
  assign which = bus.addr[3:2];

  for (genvar k = 0; k < N_PIA; k++) begin : g_pia
    pia u_pia (
      .clk(clk), .rst(rst), .bus(bus), .sel(sel && which == 2'(k)),
      .rdata(pia_rdata[k]),
      .pa_in(pa_in[k]), .pa_out(pa_out[k]), .pa_oe(pa_oe[k]),
      .pb_in(pb_in[k]), .pb_out(pb_out[k]), .pb_oe(pb_oe[k]),
      .ca1(ca1[k]), .ca2_in(ca2_in[k]), .ca2_out(ca2_out[k]), .ca2_oe(ca2_oe[k]),
      .cb1(cb1[k]), .cb2_in(cb2_in[k]), .cb2_out(cb2_out[k]), .cb2_oe(cb2_oe[k]),
      .irqa(irqa[k]), .irqb(irqb[k])
    );
  end

  assign rdata = (32'(which) < N_PIA) ? pia_rdata[which] : 8'h00;
  assign irq   = |{irqa, irqb};

  initial assert (N_PIA >= 1 && N_PIA <= 4) else $error("binary_io_card: 1..4 PIAs");
endmodule
