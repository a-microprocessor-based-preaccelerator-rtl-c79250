// encoder_counter: the 8-bit up/down counter of the operator's shaft-encoder
// knob. The CPU reads it through a PIA port and works with the difference
// between successive readings, so the counter simply wraps.
//
// The encoder's two quadrature outputs (enc_a, enc_b) pass two synchroniser
// flops each. The counter changes once per encoder cycle, on the rising edge of
// A: up when B is low, down when B is high (the encoder interface is this
// design's choice). count changes three clocks after the edge on enc_a.
module encoder_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enc_a,
  input  logic             enc_b,
  output logic [WIDTH-1:0] count
);
  logic [2:0] a_q;
  logic [1:0] b_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q   <= '0;
      b_q   <= '0;
      count <= '0;
    end else begin
      a_q <= {a_q[1:0], enc_a};
      b_q <= {b_q[0], enc_b};
      if (a_q[1] && !a_q[2]) begin
        if (b_q[1]) count <= count - 1'b1;
        else        count <= count + 1'b1;
      end
    end
  end
endmodule
