// tb_encoder_counter: turns a model quadrature encoder by random steps in
// both directions (with wrap-around past 0 and 255) and checks the count
// after every cycle against the net number of steps modulo 256.
module tb_encoder_counter;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  logic enc_a, enc_b;
  logic [7:0] count;

  encoder_counter #(.WIDTH(8)) dut (.*);

  // one full quadrature cycle; up: A leads B, down: B leads A
  task automatic step(bit up);
    if (up) begin
      enc_a = 1; repeat (4) @(negedge clk); enc_b = 1; repeat (4) @(negedge clk);
      enc_a = 0; repeat (4) @(negedge clk); enc_b = 0; repeat (4) @(negedge clk);
    end else begin
      enc_b = 1; repeat (4) @(negedge clk); enc_a = 1; repeat (4) @(negedge clk);
      enc_b = 0; repeat (4) @(negedge clk); enc_a = 0; repeat (4) @(negedge clk);
    end
  endtask

  initial begin
    int pos = 0;
    enc_a = 0; enc_b = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    checks++; if (count != 0) failures++;
    for (int r = 0; r < 12; r++) begin
      bit up = r[0];
      int n = 1 + ($urandom % 300);
      for (int i = 0; i < n; i++) begin
        step(up);
        pos += up ? 1 : -1;
        // one count per full cycle, settled within the cycle
        checks++;
        if (count != 8'(pos)) begin failures++; $display("FAIL count %0d exp %0d", count, 8'(pos)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
