// front_panel: the chassis front panel of a station as the CPU sees it.
//
// The panel carries 16 address switches and 16 data switches (four hex digits
// each), eight toggle switches, two raise/lower push buttons, an interrupt
// push button with its latch, a four-digit hex display and eight binary LEDs.
// The station software reads the switches and keeps the display and LEDs up to
// date; at the dome the data switches give a channel number and an increment
// that the raise/lower buttons request, and at the ground station the
// interrupt latch asks the software to store the data-switch word at the
// address on the address switches. All switch and button inputs pass two
// synchroniser flops. The latch is set by the rising edge of the interrupt
// button and cleared by the CPU writing 1 to bit 0 of the status register.
// Register layout (this design's own):
//   +0/+1 address switches high/low   +2/+3 data switches high/low
//   +4 toggle switches                +5 buttons: bit0 raise, bit1 lower
//   +6 status: bit0 interrupt latch (write 1 to clear)
//   +8/+9 hex display high/low (read/write)   +A LEDs (read/write)
// The manual examine/load of memory that the panel also offers is not modelled.
module front_panel
  import pac_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    bus,
  input  logic        sel,
  output logic [7:0]  rdata,
  input  logic [15:0] addr_sw,
  input  logic [15:0] data_sw,
  input  logic [7:0]  toggle_sw,
  input  logic        raise_btn,
  input  logic        lower_btn,
  input  logic        intr_btn,
  output logic [15:0] hex_display,
  output logic [7:0]  leds
);
  typedef struct packed {
    logic [15:0] addr;
    logic [15:0] data;
    logic [7:0]  toggle;
    logic        raise;
    logic        lower;
    logic        intr;
  } panel_in_t;

  panel_in_t s1, s2;
  logic      intr_d, intr_latch;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1          <= '0;
      s2          <= '0;
      intr_d      <= 1'b0;
      intr_latch  <= 1'b0;
      hex_display <= '0;
      leds        <= '0;
    end else begin
      s1     <= '{addr: addr_sw, data: data_sw, toggle: toggle_sw,
                  raise: raise_btn, lower: lower_btn, intr: intr_btn};
      s2     <= s1;
      intr_d <= s2.intr;
      if (sel && is_write(bus)) begin
        case (bus.addr[3:0])
          4'h6: if (bus.wdata[0]) intr_latch <= 1'b0;
          4'h8: hex_display[15:8] <= bus.wdata;
          4'h9: hex_display[7:0]  <= bus.wdata;
          4'hA: leds              <= bus.wdata;
          default: ;
        endcase
      end
      if (s2.intr && !intr_d) intr_latch <= 1'b1;
    end
  end

  always_comb begin
    case (bus.addr[3:0])
      4'h0:    rdata = s2.addr[15:8];
      4'h1:    rdata = s2.addr[7:0];
      4'h2:    rdata = s2.data[15:8];
      4'h3:    rdata = s2.data[7:0];
      4'h4:    rdata = s2.toggle;
      4'h5:    rdata = {6'd0, s2.lower, s2.raise};
      4'h6:    rdata = {7'd0, intr_latch};
      4'h8:    rdata = hex_display[15:8];
      4'h9:    rdata = hex_display[7:0];
      4'hA:    rdata = leds;
      default: rdata = 8'h00;
    endcase
  end
endmodule
