// relay_io_card: relay-isolated binary I/O card. The CPU writes an output
// latch whose bits drive relays (power-supply ON/OFF control) and reads
// isolated contacts (power-supply status, over/under-current status).
//
// Layout (this design's own): +0 output latch, read back; +1 status inputs,
// after two synchroniser flops because contacts change at any time. The latch
// clears on reset, so every relay starts in its off position. Outputs change
// in the clock after the write.
module relay_io_card
  import pac_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  bus_req_t         bus,
  input  logic             sel,
  output logic [7:0]       rdata,
  output logic [WIDTH-1:0] relay_out,
  input  logic [WIDTH-1:0] status_in
);
  logic [WIDTH-1:0] s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      relay_out <= '0;
      s1        <= '0;
      s2        <= '0;
    end else begin
      s1 <= status_in;
      s2 <= s1;
      if (sel && is_write(bus) && bus.addr[3:0] == 4'd0)
        relay_out <= bus.wdata[WIDTH-1:0];
    end
  end

  always_comb begin
    case (bus.addr[3:0])
      4'd0:    rdata = 8'(relay_out);
      4'd1:    rdata = 8'(s2);
      default: rdata = 8'h00;
    endcase
  end

  initial assert (WIDTH >= 1 && WIDTH <= 8) else $error("relay_io_card: WIDTH 1..8");
endmodule
