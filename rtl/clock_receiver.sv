// clock_receiver: station end of the timing link (identical at the ground
// station and in the high-voltage terminal).
//
// It runs on the 10 MHz output of the station's x20 phase-locked loop. The
// received gapped 500 kHz train is synchronised by two flops and its rising
// edges are found. The ÷20 scaler that sits inside the PLL loop divides the
// 10 MHz back to an ungapped 500 kHz: its square wave is the PLL feedback
// (div20_fb) and the ACIA clock (ungapped), with one-clock strobes at its rising
// and falling edges (bit_rise, bit_fall) for logic on the 10 MHz clock. The
// scaler is re-phased at every received edge, standing in for the phase lock;
// through a gap it runs on by itself, so its output stays ungapped. The gap
// detector reports one_gap (start of a beam cycle) and four_gap (dome reset).
// Latency: a received edge shows up three clocks later inside the block.
module clock_receiver #(
  parameter int unsigned CLKS_PER_PULSE = 20
) (
  input  logic clk,
  input  logic rst,
  input  logic train_in,
  output logic ungapped,
  output logic div20_fb,
  output logic bit_rise,
  output logic bit_fall,
  output logic one_gap,
  output logic four_gap
);
  logic [2:0] sync_q;
  logic       rise;

  always_ff @(posedge clk) begin
    if (rst) sync_q <= '0;
    else     sync_q <= {sync_q[1:0], train_in};
  end
  assign rise = sync_q[1] && !sync_q[2];

  pulse_divider #(.N(CLKS_PER_PULSE), .SYNC_VALUE(1)) u_div20 (
    .clk (clk), .rst (rst), .en (1'b1), .sync (rise),
    .tick(bit_rise), .half(bit_fall), .sq(ungapped)
  );
  assign div20_fb = ungapped;

  gap_detector #(.CLKS_PER_PULSE(CLKS_PER_PULSE)) u_gapdet (
    .clk(clk), .rst(rst), .rise(rise), .one_gap(one_gap), .four_gap(four_gap)
  );
endmodule
