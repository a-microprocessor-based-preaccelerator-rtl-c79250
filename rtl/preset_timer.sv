// preset_timer: one channel of the dual delay-timer card.
//
// A WIDTH-bit scaler counts either the 1 MHz CPU clock (cpu_tick) or the
// external clock (ext_tick, the 10 MHz time base of the timing system),
// chosen by clk_sel (1 = external). A start clears the count and lets it run;
// on the count that makes it equal to the preset register the channel emits a
// one-clock out_pulse and stops, so the delay is preset counts of the chosen
// clock after the start (a preset of 0 gives 2**WIDTH counts). With the 10 MHz
// base, 16 bits give up to 6.5 ms in 100 ns steps. A start may come from the
// external input (the beam-cycle mark), from the other channel's output, as
// chosen by start_sel, or from the CPU at any time. A new start during a run
// begins the delay again. done is set with the pulse and cleared by
// clear_done or the next start.
module preset_timer
  import pac_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cpu_tick,
  input  logic             ext_tick,
  input  logic             clk_sel,
  input  start_src_e       start_sel,
  input  logic             start_ext,
  input  logic             start_cpu,
  input  logic             start_chain,
  input  logic             clear_done,
  input  logic [WIDTH-1:0] preset,
  output logic [WIDTH-1:0] count,
  output logic             running,
  output logic             done,
  output logic             out_pulse
);
  logic start, tick;
  logic [WIDTH-1:0] next_count;

  assign start = start_cpu
              || (start_sel == START_EXT   && start_ext)
              || (start_sel == START_CHAIN && start_chain);
  assign tick       = clk_sel ? ext_tick : cpu_tick;
  assign next_count = count + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      running   <= 1'b0;
      done      <= 1'b0;
      out_pulse <= 1'b0;
    end else begin
      out_pulse <= 1'b0;
      if (clear_done) done <= 1'b0;
      if (start) begin
        count   <= '0;
        running <= 1'b1;
        done    <= 1'b0;
      end else if (running && tick) begin
        count <= next_count;
        if (next_count == preset) begin
          running   <= 1'b0;
          done      <= 1'b1;
          out_pulse <= 1'b1;
        end
      end
    end
  end
endmodule
