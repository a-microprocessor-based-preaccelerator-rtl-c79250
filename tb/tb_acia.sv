// tb_acia: two ACIAs joined as the two ends of a light link (A's txd to B's
// rxd), with a 500 kHz bit clock made from the 10 MHz clock (20 clocks per
// bit). A monitor decodes every frame on A's line independently and checks
// start bit, data, parity (even, then odd) and stop bit. Checks the bytes B
// receives, the 11-bit-per-byte rate (220 clocks per byte back to back),
// overrun, and framing and parity errors from frames the testbench drives
// onto B's input itself, and the receive interrupt.
module tb_acia;
  import pac_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  bus_req_t bus;
  logic sel_a, sel_b, use_tb_line, tb_line;
  logic [7:0] rd_a, rd_b;
  logic txd_a, txd_b, rxd_b, irq_a, irq_b;
  logic bit_rise, bit_fall;
  int ph = 0, cyc = 0;

  always @(posedge clk) begin
    ph  <= (ph + 1) % 20;
    cyc <= cyc + 1;
  end
  assign bit_fall = ph == 9;
  assign bit_rise = ph == 19;
  assign rxd_b = use_tb_line ? tb_line : txd_a;

  acia a (.clk, .rst, .bus, .sel(sel_a), .rdata(rd_a), .bit_rise, .bit_fall, .txd(txd_a), .rxd(txd_b), .irq(irq_a));
  acia b (.clk, .rst, .bus, .sel(sel_b), .rdata(rd_b), .bit_rise, .bit_fall, .txd(txd_b), .rxd(rxd_b), .irq(irq_b));

  task automatic wr(bit which, bit rs, logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b0, addr: {15'h0, rs}, wdata: d};
    sel_a = !which; sel_b = which;
    @(negedge clk);
    bus.vma = 0; sel_a = 0; sel_b = 0;
  endtask
  task automatic rd(bit which, bit rs, output logic [7:0] d);
    @(negedge clk);
    bus = '{vma: 1'b1, rw: 1'b1, addr: {15'h0, rs}, wdata: 8'h00};
    sel_a = !which; sel_b = which;
    #1 d = which ? rd_b : rd_a;
    @(negedge clk);
    bus.vma = 0; sel_a = 0; sel_b = 0;
  endtask
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // independent frame monitor on A's line (samples at the bit_rise strobe)
  bit odd_mode = 0;
  logic [7:0] mon_q[$];
  int mon_bad = 0;
  initial begin
    forever begin
      logic [10:0] f;
      @(posedge clk);
      if (bit_rise && !rst && txd_a == 0) begin
        f[0] = 0;
        for (int i = 1; i < 11; i++) begin
          do @(posedge clk); while (!bit_rise);
          f[i] = txd_a;
        end
        if (f[10] !== 1'b1 || f[9] !== ((^f[8:1]) ^ odd_mode)) mon_bad++;
        mon_q.push_back(f[8:1]);
      end
    end
  end

  // drive one frame on B's input from the testbench
  task automatic send_frame(logic [7:0] d, bit bad_parity, bit bad_stop);
    logic [10:0] f;
    f = {!bad_stop, (^d) ^ odd_mode ^ bad_parity, d, 1'b0};
    use_tb_line = 1;
    for (int i = 0; i < 11; i++) begin
      do @(posedge clk); while (!bit_fall);
      #1 tb_line = f[i];
    end
    do @(posedge clk); while (!bit_fall);
    #1 tb_line = 1;
  endtask

  initial begin
    logic [7:0] d, st;
    logic [7:0] sent[$];
    int t0, t1;
    bus = '0; sel_a = 0; sel_b = 0; use_tb_line = 0; tb_line = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    wr(0, 0, 8'h03); wr(1, 0, 8'h03);       // master reset
    wr(0, 0, 8'h00); wr(1, 0, 8'h80);       // even parity, B receive interrupt
    rd(0, 0, st); check("A TDRE after reset", st[ST_TDRE], 1);
    // 16 bytes back to back, B reads each as it arrives
    t0 = cyc;
    begin
      int ns = 0, nr = 0;
      while (nr < 16) begin
        if (ns < 16) begin
          rd(0, 0, st);
          if (st[ST_TDRE]) begin
            d = 8'($urandom);
            sent.push_back(d);
            wr(0, 1, d);
            ns++;
          end
        end
        rd(1, 0, st);
        if (st[ST_RDRF]) begin
          check("B irq", int'(irq_b), 1);
          check("B errors", int'(st[ST_FE] | st[ST_PE] | st[ST_OVRN]), 0);
          rd(1, 1, d);
          check("B data", d, sent[nr]);
          nr++;
          if (nr == 16) t1 = cyc;
        end
      end
    end
    // 16 frames of 11 bits at 20 clocks; first start bit waits up to one bit
    checks++;
    if (t1 - t0 < 16 * 220 || t1 - t0 > 16 * 220 + 60) begin
      failures++; $display("FAIL rate: %0d clocks for 16 bytes", t1 - t0);
    end
    check("monitor frames", mon_q.size(), 16);
    check("monitor parity/stop", mon_bad, 0);
    for (int i = 0; i < 16 && i < mon_q.size(); i++) check("monitor data", mon_q[i], sent[i]);
    check("B irq cleared", int'(irq_b), 0);
    // overrun: two bytes, not read in between
    wr(0, 1, 8'h5A);
    repeat (230) @(negedge clk);
    wr(0, 1, 8'hC3);
    repeat (500) @(negedge clk);
    rd(1, 0, st); check("overrun flag", st[ST_OVRN], 1); check("RDRF with overrun", st[ST_RDRF], 1);
    rd(1, 1, d);  check("first byte kept", d, 8'h5A);
    rd(1, 0, st); check("overrun cleared", st[ST_OVRN], 0);
    // odd parity on both ends
    odd_mode = 1;
    wr(0, 0, 8'h04); wr(1, 0, 8'h04);
    mon_q.delete();
    wr(0, 1, 8'h81);
    repeat (300) @(negedge clk);
    rd(1, 0, st); check("odd parity ok", int'(st[ST_PE]), 0);
    rd(1, 1, d);  check("odd data", d, 8'h81);
    check("odd monitor", mon_bad, 0);
    // framing error and parity error from the testbench line
    send_frame(8'h3C, 0, 1);
    repeat (40) @(negedge clk);
    rd(1, 0, st); check("framing error", st[ST_FE], 1); check("no PE", st[ST_PE], 0);
    rd(1, 1, d);  check("FE data", d, 8'h3C);
    send_frame(8'h77, 1, 0);
    repeat (40) @(negedge clk);
    rd(1, 0, st); check("parity error", st[ST_PE], 1); check("no FE", st[ST_FE], 0);
    rd(1, 1, d);
    send_frame(8'h12, 0, 0);
    repeat (40) @(negedge clk);
    rd(1, 0, st); check("clean frame", int'(st[ST_PE] | st[ST_FE]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
