// gap_detector: finds the missing pulses of the gapped 500 kHz timing train.
//
// The transmitter marks the start of each beam cycle by removing one pulse and
// orders a reset of the dome CPU by removing four. The detector runs on the
// 10 MHz time base (CLKS_PER_PULSE clocks per 2 us pulse period), counts
// clocks between rising edges of the received train and rounds the interval to
// whole pulse periods: two periods mean one missing pulse (one_gap), five
// periods mean four (four_gap). The flag is a one-clock pulse, registered, in
// the clock after the edge that ends the gap. Other intervals give no flag, and
// the first edge after reset only starts the measurement.
// The counting method is this design's own; the text only says the clock
// receivers detect the missing pulses.
module gap_detector #(
  parameter int unsigned CLKS_PER_PULSE = 20
) (
  input  logic clk,
  input  logic rst,
  input  logic rise,      // one-clock strobe at each rising edge of the train
  output logic one_gap,
  output logic four_gap
);
  localparam int unsigned MAXC = CLKS_PER_PULSE * 8;
  localparam int unsigned W    = $clog2(MAXC + 1);
  localparam int unsigned N    = CLKS_PER_PULSE;

  logic [W-1:0] cnt;    // clocks since the last rising edge
  logic         seen;   // at least one edge received
  logic [W-1:0] interval;

  assign interval = cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      seen     <= 1'b0;
      one_gap  <= 1'b0;
      four_gap <= 1'b0;
    end else begin
      one_gap  <= 1'b0;
      four_gap <= 1'b0;
      if (rise) begin
        cnt  <= '0;
        seen <= 1'b1;
        if (seen) begin
          // 2 periods (one pulse missing) or 5 periods (four pulses missing)
          if (32'(interval) * 2 >= 3 * N && 32'(interval) * 2 < 5 * N)
            one_gap <= 1'b1;
          if (32'(interval) * 2 >= 9 * N && 32'(interval) * 2 < 11 * N)
            four_gap <= 1'b1;
        end
      end else if (cnt != W'(MAXC)) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
