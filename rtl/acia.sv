// acia: asynchronous communication interface adapter for the fiber-optic data
// links between the two stations.
//
// The transmitter takes a byte from the CPU, adds a parity bit and sends it
// serially: start bit (0), eight data bits LSB first, parity, stop bit (1),
// 11 bit times per byte; the line idles at 1. The receiver turns the serial
// stream back into bytes and checks each one: framing error (stop bit 0),
// parity error, and overrun (a byte completed while the previous one has not
// been read; the new byte is lost).
//
// The ACIA runs in its divide-by-1 (synchronous) clock mode from the ungapped
// 500 kHz of the clock receiver, i.e. 500 kbit/s. Both stations take that
// clock from the same timing train, so the transmitter changes the line at the
// falling edge (bit_fall strobe) and the receiver samples at the rising edge
// (bit_rise), half a bit later. All logic runs on the 10 MHz station clock.
//
// Registers (6850-style layout, this design's choice), addr[0] = RS:
//   RS=0 read status: bit0 RDRF, bit1 TDRE, bit4 FE, bit5 OVRN, bit6 PE, bit7 IRQ
//   RS=0 write control: bits1:0 = 11 master reset, bit2 odd parity, bit7 receive
//        interrupt enable
//   RS=1 read received byte (clears RDRF and OVRN); write byte to send
// Writing a byte while TDRE is 0 overwrites the waiting byte.
module acia
  import pac_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  bus_req_t   bus,
  input  logic       sel,
  output logic [7:0] rdata,
  input  logic       bit_rise,
  input  logic       bit_fall,
  output logic       txd,
  input  logic       rxd,
  output logic       irq
);
  logic odd_par, rie;
  logic wr_ctl, wr_data, rd_data;
  logic master_reset;

  assign wr_ctl       = sel && is_write(bus) && !bus.addr[0];
  assign wr_data      = sel && is_write(bus) &&  bus.addr[0];
  assign rd_data      = sel && is_read(bus)  &&  bus.addr[0];
  assign master_reset = wr_ctl && bus.wdata[1:0] == 2'b11;

  always_ff @(posedge clk) begin
    if (rst) begin
      odd_par <= 1'b0;
      rie     <= 1'b0;
    end else if (wr_ctl) begin
      odd_par <= bus.wdata[2];
      rie     <= bus.wdata[7];
    end
  end

  // ---------------- transmitter ----------------
  logic [7:0]  tdr;
  logic        tdre;
  logic [10:0] tx_shift;
  logic [3:0]  tx_left;     // bits still to send after the one on the line

  always_ff @(posedge clk) begin
    if (rst || master_reset) begin
      tdre     <= 1'b1;
      tdr      <= '0;
      tx_shift <= '1;
      tx_left  <= '0;
      txd      <= 1'b1;
    end else begin
      if (bit_fall) begin
        if (tx_left != 0) begin
          txd      <= tx_shift[0];
          tx_shift <= {1'b1, tx_shift[10:1]};
          tx_left  <= tx_left - 1'b1;
        end else if (!tdre) begin
          // stop, parity, data, start: start bit goes out now
          txd      <= 1'b0;
          tx_shift <= {1'b1, 1'b1, (^tdr) ^ odd_par, tdr};
          tx_left  <= 4'd10;
          tdre     <= 1'b1;
        end else begin
          txd <= 1'b1;
        end
      end
      if (wr_data) begin
        tdr  <= bus.wdata;
        tdre <= 1'b0;
      end
    end
  end

  // ---------------- receiver ----------------
  logic [1:0] rx_sync;
  logic       rx_s;
  logic       rx_busy;
  logic [3:0] rx_bit;       // 0..7 data, 8 parity, 9 stop
  logic [7:0] rx_data;
  logic       rx_par;
  logic [7:0] rdr;
  logic       rdrf, fe, ovrn, pe;

  always_ff @(posedge clk) begin
    if (rst) rx_sync <= 2'b11;
    else     rx_sync <= {rx_sync[0], rxd};
  end
  assign rx_s = rx_sync[1];

  always_ff @(posedge clk) begin
    if (rst || master_reset) begin
      rx_busy <= 1'b0;
      rx_bit  <= '0;
      rx_data <= '0;
      rx_par  <= 1'b0;
      rdr     <= '0;
      rdrf    <= 1'b0;
      fe      <= 1'b0;
      ovrn    <= 1'b0;
      pe      <= 1'b0;
    end else begin
      if (rd_data) begin
        rdrf <= 1'b0;
        ovrn <= 1'b0;
      end
      if (bit_rise) begin
        if (!rx_busy) begin
          if (!rx_s) begin
            rx_busy <= 1'b1;      // start bit
            rx_bit  <= '0;
          end
        end else if (rx_bit < 4'd8) begin
          rx_data <= {rx_s, rx_data[7:1]};
          rx_bit  <= rx_bit + 1'b1;
        end else if (rx_bit == 4'd8) begin
          rx_par <= rx_s;
          rx_bit <= rx_bit + 1'b1;
        end else begin
          // stop bit: the byte is complete
          rx_busy <= 1'b0;
          if (rdrf && !rd_data) begin
            ovrn <= 1'b1;
          end else begin
            rdr  <= rx_data;
            rdrf <= 1'b1;
            fe   <= !rx_s;
            pe   <= (^rx_data) ^ rx_par ^ odd_par;
          end
        end
      end
    end
  end

  assign irq = rie && (rdrf || ovrn);

  always_comb begin
    if (bus.addr[0]) rdata = rdr;
    else begin
      rdata          = 8'h00;
      rdata[ST_RDRF] = rdrf;
      rdata[ST_TDRE] = tdre;
      rdata[ST_FE]   = fe;
      rdata[ST_OVRN] = ovrn;
      rdata[ST_PE]   = pe;
      rdata[ST_IRQ]  = irq;
    end
  end
endmodule
