// pulse_divider: divide-by-N scaler of the timing system (the ÷2, ÷4 and ÷20
// boxes of the timing chain).
//
// A counter runs 0..N-1, advancing on each clock where en is high. Two strobes
// come out, each one clock wide and only on an en clock: tick on the event
// that wraps the counter (one per N events) and half on the event that ends
// the first half of the count. sq is high while the count is in its first
// half, so with en tied high it is a square wave of clk/N.
// sync loads the counter with SYNC_VALUE; the clock receiver uses it to keep
// its ÷20 scaler in phase with the received pulse train, standing in for the
// phase lock of the real loop (this design's choice).
module pulse_divider #(
  parameter int unsigned N          = 2,
  parameter int unsigned SYNC_VALUE = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic sync,
  output logic tick,
  output logic half,
  output logic sq
);
  localparam int unsigned W = (N > 2) ? $clog2(N) : 1;
  localparam logic [W-1:0] LAST  = W'(N - 1);
  localparam logic [W-1:0] HLAST = W'(N / 2 - 1);

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)            cnt <= '0;
    else if (sync)      cnt <= W'(SYNC_VALUE % N);
    else if (en)        cnt <= (cnt == LAST) ? '0 : cnt + 1'b1;
  end

  assign tick = en && (cnt == LAST);
  assign half = en && (cnt == HLAST);
  assign sq   = (cnt <= HLAST);

  initial assert (N >= 2) else $error("pulse_divider: N must be at least 2");
endmodule
