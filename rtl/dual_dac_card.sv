// dual_dac_card: dual 12-bit D/A converter card (digital side).
//
// Two setting registers, A and B, drive the codes of two 12-bit converters.
// A setting is a 16-bit word in the station's analog format, a left-adjusted
// signed binary fraction of 10 V, so the converter code is word bits 15:4
// (two's complement, 0x800 = -10 V, 0x7FF = +10 V - 1 LSB). Register layout
// (this design's own): +0 A high byte, +1 A low byte, +2 B high byte, +3 B low
// byte. A high-byte write is held in a buffer; the low-byte write moves the
// whole word to the converter at once, so the analog output never shows half
// a new setting. Reads return the settings in force. Reset clears both to zero
// (0 V), the power-on setting. Codes change in the clock after the write.
module dual_dac_card
  import pac_pkg::*;
#(
  parameter int unsigned BITS = 12
) (
  input  logic            clk,
  input  logic            rst,
  input  bus_req_t        bus,
  input  logic            sel,
  output logic [7:0]      rdata,
  output logic [BITS-1:0] code_a,
  output logic [BITS-1:0] code_b
);
  logic [15:0] setting [2];
  logic [7:0]  hi_buf  [2];
  logic        ch;
  assign ch = bus.addr[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2; i++) begin
        setting[i] <= '0;
        hi_buf[i]  <= '0;
      end
    end else if (sel && is_write(bus) && bus.addr[3:2] == 2'b00) begin
      if (!bus.addr[0]) hi_buf[ch]  <= bus.wdata;
      else              setting[ch] <= {hi_buf[ch], bus.wdata & 8'(16'hFFFF << (16 - BITS))};
    end
  end

  assign code_a = setting[0][15 -: BITS];
  assign code_b = setting[1][15 -: BITS];

  always_comb begin
    if (bus.addr[3:2] != 2'b00) rdata = 8'h00;
    else if (!bus.addr[0])      rdata = setting[ch][15:8];
    else                        rdata = setting[ch][7:0];
  end

  initial assert (BITS > 8 && BITS <= 16) else $error("dual_dac_card: BITS 9..16");
endmodule
