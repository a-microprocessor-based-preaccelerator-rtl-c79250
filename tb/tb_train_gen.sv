// tb_train_gen: testbench model of the received timing train. It produces the
// gapped 500 kHz pulse train on the 10 MHz clock (20 clocks per period, high
// for the first 10) and removes one pulse when gap1 is pulsed or four pulses
// when gap4 is pulsed, starting at the next period.
module tb_train_gen (
  input  logic clk,
  input  logic gap1,
  input  logic gap4,
  output logic train
);
  int ph = 0, remove = 0, want = 0;
  always @(posedge clk) begin
    if (gap1) want = 1;
    if (gap4) want = 4;
    ph = (ph + 1) % 20;
    if (ph == 0) begin
      if (remove > 0) remove--;
      else if (want > 0) begin remove = want; want = 0; end
    end
    train <= (ph < 10) && (remove == 0);
  end
endmodule
