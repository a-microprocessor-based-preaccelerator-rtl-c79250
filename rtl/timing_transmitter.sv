// timing_transmitter: source of the gapped 500 kHz timing train.
//
// The 1 MHz crystal clock is divided by two to a 500 kHz pulse train. Each
// pulse is the high half of a 2 us period. Pulses from the line zero-crossing
// detector (60 Hz) are divided by LINE_DIV (4) to give the 15 Hz beam cycle;
// at each such cycle one pulse is removed from the train (the "1 gap"). A
// RESET request removes four consecutive pulses (the "4 gap"), which the dome
// clock receiver turns into a CPU reset. Gaps are inserted synchronously, on
// whole periods, and at least one pulse is always sent between two gaps; a
// 4-gap request waiting together with a 1-gap request goes first (this
// ordering is this design's choice). zero_cross and reset_req are asynchronous
// and are synchronised; each rising edge counts once. pulse_train is a flop
// output.
module timing_transmitter #(
  parameter int unsigned LINE_DIV = 4
) (
  input  logic clk_1mhz,
  input  logic rst,
  input  logic zero_cross,
  input  logic reset_req,
  output logic pulse_train
);
  logic [2:0] zc_q, rr_q;
  logic       zc_rise, rr_rise;

  always_ff @(posedge clk_1mhz) begin
    if (rst) begin
      zc_q <= '0;
      rr_q <= '0;
    end else begin
      zc_q <= {zc_q[1:0], zero_cross};
      rr_q <= {rr_q[1:0], reset_req};
    end
  end
  assign zc_rise = zc_q[1] && !zc_q[2];
  assign rr_rise = rr_q[1] && !rr_q[2];

  // ÷2: 500 kHz phase
  logic period_end, sq500, unused_half2;
  pulse_divider #(.N(2)) u_div2 (
    .clk(clk_1mhz), .rst(rst), .en(1'b1), .sync(1'b0),
    .tick(period_end), .half(unused_half2), .sq(sq500)
  );

  // ÷4 of the zero crossings: 15 Hz beam cycle
  logic cycle_tick, unused_half4, unused_sq4;
  pulse_divider #(.N(LINE_DIV)) u_div4 (
    .clk(clk_1mhz), .rst(rst), .en(zc_rise), .sync(1'b0),
    .tick(cycle_tick), .half(unused_half4), .sq(unused_sq4)
  );

  // Synchronous 1 and 4 gap generator
  logic       pend1, pend4, suppress;
  logic [1:0] remaining;

  always_ff @(posedge clk_1mhz) begin
    if (rst) begin
      pend1       <= 1'b0;
      pend4       <= 1'b0;
      suppress    <= 1'b0;
      remaining   <= '0;
      pulse_train <= 1'b0;
    end else begin
      if (cycle_tick) pend1 <= 1'b1;
      if (rr_rise)    pend4 <= 1'b1;
      if (period_end) begin
        if (remaining != 0) begin
          suppress  <= 1'b1;
          remaining <= remaining - 1'b1;
        end else if (suppress) begin
          suppress <= 1'b0;              // one pulse at least between gaps
        end else if (pend4 || rr_rise) begin
          suppress  <= 1'b1;
          remaining <= 2'd3;
          pend4     <= 1'b0;
        end else if (pend1 || cycle_tick) begin
          suppress <= 1'b1;
          pend1    <= 1'b0;
        end
      end
      pulse_train <= sq500 && !suppress;
    end
  end
endmodule
