// pia: peripheral interface adapter, two 8-bit ports whose bit directions are
// set by the program, with four control lines (CA1, CA2, CB1, CB2).
//
// Per port there is an output register, a data-direction register (1 = the
// bit is an output) and a control register. Register select is addr[1:0]
// (6821-style layout, this design's choice):
//   0 port A data, or DDRA when CRA bit2 = 0     1 CRA
//   2 port B data, or DDRB when CRB bit2 = 0     3 CRB
// Reading a data register returns the output register for output bits and the
// pin for input bits. Control register bits: 0 C1 interrupt enable, 1 C1 active
// edge (1 = rising), 2 data/direction select, 3 C2 interrupt enable (C2 input)
// or C2 level (C2 output), 4 C2 active edge (1 = rising), 5 C2 is an output,
// 6 C2 flag and 7 C1 flag (read only). A flag is set by the active edge on its
// control input and cleared by reading the port's data register. The 6821
// handshake and pulse modes of C2 are not provided: an output C2 follows bit 3.
// Control inputs pass two synchroniser flops, so a flag is set three clocks
// after the edge. irqa/irqb are the enabled flags. Pins are given as separate
// in, out and output-enable signals.
module pia
  import pac_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  bus_req_t   bus,
  input  logic       sel,
  output logic [7:0] rdata,
  input  logic [7:0] pa_in,
  output logic [7:0] pa_out,
  output logic [7:0] pa_oe,
  input  logic [7:0] pb_in,
  output logic [7:0] pb_out,
  output logic [7:0] pb_oe,
  input  logic       ca1,
  input  logic       ca2_in,
  output logic       ca2_out,
  output logic       ca2_oe,
  input  logic       cb1,
  input  logic       cb2_in,
  output logic       cb2_out,
  output logic       cb2_oe,
  output logic       irqa,
  output logic       irqb
);
  logic [7:0] orr [2];
  logic [7:0] ddr [2];
  logic [5:0] cr  [2];
  logic [1:0] f1, f2;
  logic [7:0] pin [2];
  logic [2:0] c1_q [2];
  logic [2:0] c2_q [2];
  logic [1:0] c1_edge, c2_edge;

  logic       port;     // 0 = A, 1 = B
  logic       is_cr;
  assign port  = bus.addr[1];
  assign is_cr = bus.addr[0];
  assign pin[0] = pa_in;
  assign pin[1] = pb_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2; i++) begin
        c1_q[i] <= '0;
        c2_q[i] <= '0;
      end
    end else begin
      c1_q[0] <= {c1_q[0][1:0], ca1};
      c1_q[1] <= {c1_q[1][1:0], cb1};
      c2_q[0] <= {c2_q[0][1:0], ca2_in};
      c2_q[1] <= {c2_q[1][1:0], cb2_in};
    end
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      c1_edge[i] = cr[i][1] ? (c1_q[i][1] && !c1_q[i][2]) : (!c1_q[i][1] && c1_q[i][2]);
      c2_edge[i] = !cr[i][5] &&
                   (cr[i][4] ? (c2_q[i][1] && !c2_q[i][2]) : (!c2_q[i][1] && c2_q[i][2]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2; i++) begin
        orr[i] <= '0;
        ddr[i] <= '0;
        cr[i]  <= '0;
      end
      f1 <= '0;
      f2 <= '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (c1_edge[i]) f1[i] <= 1'b1;
        if (c2_edge[i]) f2[i] <= 1'b1;
      end
      if (sel && bus.vma) begin
        if (!bus.rw) begin
          if (is_cr)             cr[port]  <= bus.wdata[5:0];
          else if (cr[port][2])  orr[port] <= bus.wdata;
          else                   ddr[port] <= bus.wdata;
        end else if (!is_cr && cr[port][2]) begin
          f1[port] <= 1'b0;
          f2[port] <= 1'b0;
        end
      end
    end
  end

  logic [7:0] port_val [2];
  always_comb begin
    for (int i = 0; i < 2; i++)
      port_val[i] = (orr[i] & ddr[i]) | (pin[i] & ~ddr[i]);
    if (is_cr)            rdata = {f1[port], f2[port], cr[port]};
    else if (cr[port][2]) rdata = port_val[port];
    else                  rdata = ddr[port];
  end

  assign pa_out  = orr[0];
  assign pa_oe   = ddr[0];
  assign pb_out  = orr[1];
  assign pb_oe   = ddr[1];
  assign ca2_oe  = cr[0][5];
  assign ca2_out = cr[0][3];
  assign cb2_oe  = cr[1][5];
  assign cb2_out = cr[1][3];
  assign irqa    = (f1[0] && cr[0][0]) || (f2[0] && cr[0][3] && !cr[0][5]);
  assign irqb    = (f1[1] && cr[1][0]) || (f2[1] && cr[1][3] && !cr[1][5]);
endmodule
