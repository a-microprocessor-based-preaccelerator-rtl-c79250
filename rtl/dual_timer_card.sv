// dual_timer_card: dual-channel delay timer card on the station backplane.
//
// Two preset_timer channels, A at card offset 0 and B at offset 8, each with
// the registers below (the register layout is this design's own):
//   +0 preset high byte   +1 preset low byte            (read/write)
//   +2 control: bit0 clock (0 = 1 MHz CPU clock, 1 = external 10 MHz),
//               bits2:1 start source (0 external pulse, 1 CPU only,
//               2 output of the other channel)           (read/write)
//   +3 write: start the channel from the CPU
//   +4 status: bit0 done, bit1 running; reading clears done
//   +5 count high byte    +6 count low byte               (read only)
// The other channel of A is B and of B is A, so one channel can delay the
// other's trigger. ext_start carries each channel's external start pulse;
// out carries the one-clock delayed triggers. Reads are combinational; writes
// and read side effects take effect at the clock edge of the bus cycle.
module dual_timer_card
  import pac_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  bus_req_t   bus,
  input  logic       sel,
  output logic [7:0] rdata,
  input  logic       cpu_tick,
  input  logic       ext_tick,
  input  logic [1:0] ext_start,
  output logic [1:0] out
);
  logic [15:0] preset   [2];
  logic [2:0]  ctrl     [2];
  logic [15:0] count    [2];
  logic [1:0]  running, done, start_cpu, clear_done;

  logic [2:0] reg_idx;
  logic       ch;
  assign ch      = bus.addr[3];
  assign reg_idx = bus.addr[2:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2; i++) begin
        preset[i] <= '0;
        ctrl[i]   <= 3'b010;   // CPU start, CPU clock
      end
    end else if (sel && is_write(bus)) begin
      case (reg_idx)
        3'd0: preset[ch][15:8] <= bus.wdata;
        3'd1: preset[ch][7:0]  <= bus.wdata;
        3'd2: ctrl[ch]         <= bus.wdata[2:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      start_cpu[i]  = sel && is_write(bus) && reg_idx == 3'd3 && ch == 1'(i);
      clear_done[i] = sel && is_read(bus)  && reg_idx == 3'd4 && ch == 1'(i);
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_ch
    preset_timer #(.WIDTH(16)) u_timer (
      .clk        (clk),
      .rst        (rst),
      .cpu_tick   (cpu_tick),
      .ext_tick   (ext_tick),
      .clk_sel    (ctrl[i][0]),
      .start_sel  (start_src_e'(ctrl[i][2:1])),
      .start_ext  (ext_start[i]),
      .start_cpu  (start_cpu[i]),
      .start_chain(out[1-i]),
      .clear_done (clear_done[i]),
      .preset     (preset[i]),
      .count      (count[i]),
      .running    (running[i]),
      .done       (done[i]),
      .out_pulse  (out[i])
    );
  end

  always_comb begin
    case (reg_idx)
      3'd0:    rdata = preset[ch][15:8];
      3'd1:    rdata = preset[ch][7:0];
      3'd2:    rdata = {5'd0, ctrl[ch]};
      3'd4:    rdata = {6'd0, running[ch], done[ch]};
      3'd5:    rdata = count[ch][15:8];
      3'd6:    rdata = count[ch][7:0];
      default: rdata = 8'h00;
    endcase
  end
endmodule
