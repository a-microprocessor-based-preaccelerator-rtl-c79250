// tb_preaccelerator_top: end-to-end run of the whole control system at its
// default sizes. The testbench supplies what is outside the RTL: the 1 MHz
// crystal, an ideal locked x20 PLL clock at each station (the dome's 20 ns
// behind the ground's), the 60 Hz zero-crossing pulses, the fiber links as
// wires, a 16-channel A/D model on the dome PIA, relay contacts, the knob,
// and one bus-master process per station that plays the station software:
//   ground: at each 15 Hz interrupt sends a data request record and receives
//           the 26-word data pool (56 bytes: header, count, 52 data bytes,
//           checksum, zero); in the first cycle it also sends a D/A setting
//           to the dome and reads the knob counter.
//           A raise/lower request in the pool is answered with a setting
//           record; the front-panel interrupt latch makes it store the
//           data-switch word at the address on the address switches, in its
//           own card file or, with toggle switch 0 on, in the dome through a
//           store record.
//   dome:   polls its ACIA, checks each record and answers a request with the
//           data pool (8 D/A settings, 3 relay status words, 14 A/D readings
//           and the front-panel raise/lower request), applies a setting or
//           stores a word at an address.
// Records use an 8-bit sum of header, count and data bytes as the checksum
// (this testbench's choice). Mechanisms made to happen and counted: beam
// cycles seen at both stations (1-gap), the dome CPU reset (4-gap), the
// framing error and overrun checks of the dome ACIA, timers started by the
// beam cycle, by another timer and by the CPU, D/A settings over the link and
// knob counting, a dome raise/lower request, and ground front-panel stores
// into both stations. Also checked: the 15 Hz period and the time to move
// the 56-byte data pool (at least 56 x 11 bits at 500 kbit/s, and within
// 5.3 ms).
module tb_preaccelerator_top;
  import pac_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask
  task automatic check_range(string what, longint got, longint lo, longint hi);
    checks++;
    if (got < lo || got > hi) begin failures++; $display("FAIL %s: %0d not in %0d..%0d", what, got, lo, hi); end
  endtask

  // ---------------- clocks and environment ----------------
  logic clk10 = 0, clk_1mhz = 0, clk_dome = 0, rst_n = 0;
  always #50  clk10 = ~clk10;
  always #500 clk_1mhz = ~clk_1mhz;
  always @(clk10) clk_dome <= #20 clk10;

  logic zero_cross = 0, reset_dome_req = 0;
  logic timing_tx, gnd_div20_fb, dome_div20_fb;
  logic gnd_link_tx, dome_link_tx, break_to_dome = 0;
  logic enc_a = 0, enc_b = 0;

  bus_req_t gbus = '0, dbus = '0;
  logic [7:0] grdata, drdata;
  logic gnd_irq, dome_cpu_reset, dome_beam_cycle;
  logic [2:0][7:0]  gnd_pa_in = '0;
  logic [3:0][7:0]  gnd_pa_out, gnd_pa_oe, gnd_pb_out, gnd_pb_oe;
  logic [3:0][7:0]  gnd_pb_in = '0;
  logic [3:0]       gnd_ca2_out, gnd_ca2_oe, gnd_cb2_out, gnd_cb2_oe;
  logic [3:0][11:0] gnd_dac_code;
  logic [1:0]       gnd_timer_out;
  logic [7:0]       dome_pa_in, dome_pa_out, dome_pa_oe, dome_pb_out, dome_pb_oe;
  logic             dome_ca2_out, dome_ca2_oe, dome_cb2_out, dome_cb2_oe;
  logic [7:0][11:0] dome_dac_code;
  logic [2:0][7:0]  dome_relay_out;
  logic [2:0][7:0]  dome_relay_in = {8'h5A, 8'hC3, 8'h0F};
  logic [3:0]       dome_timer_out;
  // front panels: ground stores 7FF0 at 8030 (its D/A slot 3, channel A);
  // dome data switches ask for channel 3 to be raised by 0x10 codes
  logic [15:0] gnd_fp_addr_sw = 16'h8030, gnd_fp_data_sw = 16'h7FF0, gnd_fp_hex;
  logic [15:0] dome_fp_addr_sw = 16'h0000, dome_fp_data_sw = 16'h0310, dome_fp_hex;
  logic [7:0]  gnd_fp_leds, dome_fp_leds, gnd_fp_toggle_sw = 8'h00;
  logic        gnd_fp_intr = 0, dome_fp_raise = 0;

  // A/D model: the dome PIA port B low nibble selects the channel and port A
  // returns the top eight bits of the reading.
  function automatic logic [7:0] adc_value(int ch);
    return 8'(8'h30 + 5 * ch);
  endfunction
  assign dome_pa_in = adc_value(int'(dome_pb_out[3:0]));

  preaccelerator_top dut (
    .clk_1mhz, .clk_gnd(clk10), .clk_dome, .rst_n,
    .zero_cross, .reset_dome_req, .timing_tx,
    .timing_rx_gnd(timing_tx), .timing_rx_dome(timing_tx),
    .gnd_div20_fb, .dome_div20_fb,
    .gnd_link_tx, .gnd_link_rx(dome_link_tx),
    .dome_link_tx, .dome_link_rx(gnd_link_tx && !break_to_dome),
    .gnd_fp_addr_sw, .gnd_fp_data_sw, .gnd_fp_toggle_sw, .gnd_fp_raise(1'b0),
    .gnd_fp_lower(1'b0), .gnd_fp_intr, .gnd_fp_hex, .gnd_fp_leds,
    .dome_fp_addr_sw, .dome_fp_data_sw, .dome_fp_toggle_sw(8'h00), .dome_fp_raise,
    .dome_fp_lower(1'b0), .dome_fp_intr(1'b0), .dome_fp_hex, .dome_fp_leds,
    .gnd_bus(gbus), .gnd_rdata(grdata), .gnd_irq, .enc_a, .enc_b,
    .gnd_pa_in, .gnd_pa_out, .gnd_pa_oe, .gnd_pb_in, .gnd_pb_out, .gnd_pb_oe,
    .gnd_ca1(4'h0), .gnd_ca2_in(4'h0), .gnd_ca2_out, .gnd_ca2_oe,
    .gnd_cb1(4'h0), .gnd_cb2_in(4'h0), .gnd_cb2_out, .gnd_cb2_oe,
    .gnd_dac_code, .gnd_timer_out,
    .dome_bus(dbus), .dome_rdata(drdata), .dome_cpu_reset, .dome_beam_cycle,
    .dome_pa_in, .dome_pa_out, .dome_pa_oe, .dome_pb_in(8'h00), .dome_pb_out, .dome_pb_oe,
    .dome_ca1(1'b0), .dome_ca2_in(1'b0), .dome_ca2_out, .dome_ca2_oe,
    .dome_cb1(1'b0), .dome_cb2_in(1'b0), .dome_cb2_out, .dome_cb2_oe,
    .dome_dac_code, .dome_relay_out, .dome_relay_in, .dome_timer_out
  );

  // 60 Hz line zero crossings
  initial begin
    #3us;
    forever begin
      zero_cross = 1; #100us; zero_cross = 0; #(16667us - 100us);
    end
  end

  // ---------------- event counters ----------------
  longint cyc = 0;
  int n_gnd_cycle = 0, n_dome_cycle = 0, n_dome_reset = 0;
  int n_tA = 0, n_tB = 0, n_tC = 0;
  longint t_dome_cycle = 0, t_tA = 0, t_tB = 0, t_gnd_cycle[$];
  always @(posedge clk10) begin
    cyc++;
    if (rst_n) begin
      if (dut.u_gnd.one_gap) begin n_gnd_cycle++; t_gnd_cycle.push_back(cyc); end
      if (dome_beam_cycle) begin n_dome_cycle++; t_dome_cycle = cyc; end
      if (dome_cpu_reset) n_dome_reset++;
      if (dome_timer_out[0]) begin n_tA++; t_tA = cyc; end
      if (dome_timer_out[1]) begin n_tB++; t_tB = cyc; end
      if (dome_timer_out[2]) n_tC++;
    end
  end

  // ---------------- ground CPU model ----------------
  task automatic gwr(logic [15:0] a, logic [7:0] d);
    @(negedge clk10); gbus = '{vma: 1'b1, rw: 1'b0, addr: a, wdata: d};
    @(negedge clk10); gbus.vma = 1'b0;
  endtask
  task automatic grd(logic [15:0] a, output logic [7:0] d);
    @(negedge clk10); gbus = '{vma: 1'b1, rw: 1'b1, addr: a, wdata: 8'h00};
    #1 d = grdata;
    @(negedge clk10); gbus.vma = 1'b0;
  endtask
  task automatic g_send(logic [7:0] b);
    logic [7:0] st;
    do grd(16'h8010, st); while (!st[ST_TDRE]);
    gwr(16'h8011, b);
  endtask
  task automatic g_recv(output logic [7:0] b);
    logic [7:0] st;
    do grd(16'h8010, st); while (!st[ST_RDRF]);
    check("ground ACIA byte without error", int'(st[ST_FE] | st[ST_PE] | st[ST_OVRN]), 0);
    grd(16'h8011, b);
  endtask
  task automatic g_record(logic [7:0] hdr, logic [15:0] words[$]);
    logic [7:0] sum;
    sum = hdr + 8'(words.size());
    g_send(hdr); g_send(8'(words.size()));
    foreach (words[i]) begin
      g_send(words[i][15:8]); g_send(words[i][7:0]);
      sum += words[i][15:8] + words[i][7:0];
    end
    g_send(sum); g_send(8'h00);
  endtask

  // what the dome's D/A channels hold, kept by the testbench
  logic [15:0] dac_model [8];
  bit dome_hold = 0;
  bit ground_done = 0;
  int n_pool = 0, n_raise = 0, n_fp_store = 0;
  bit raise_expected = 0;

  initial begin : ground_cpu
    logic [7:0] d, hdr, cnt, cks, z, sum;
    logic [15:0] w, req, none[$];
    longint t0, t1;
    wait (rst_n);
    repeat (20) @(negedge clk10);
    gwr(16'h8010, 8'h03); gwr(16'h8010, 8'h00);
    gnd_fp_intr = 1; #5us gnd_fp_intr = 0;
    // knob: 12 steps up
    for (int i = 0; i < 12; i++) begin
      enc_a = 1; #2us; enc_b = 1; #2us; enc_a = 0; #2us; enc_b = 0; #2us;
    end
    gwr(16'h800D, 8'h04); grd(16'h800C, d);
    check("knob counter via PIA 3", d, 12);
    for (int cycle = 0; cycle < 2; cycle++) begin
      // wait for the 15 Hz interrupt
      do grd(16'h8100, d); while (!d[0]);
      gwr(16'h8100, 8'h01);
      check("15 Hz latch cleared", int'(gnd_irq), 0);
      // front panel interrupt latch: store the data switches at the address
      grd(16'h80F6, d);
      if (d[0]) begin
        logic [7:0] ah, al, dh, dl;
        grd(16'h80F0, ah); grd(16'h80F1, al); grd(16'h80F2, dh); grd(16'h80F3, dl);
        grd(16'h80F4, d);
        if (d[0]) begin
          // toggle switch 0: the address is in the dome; send it a store record
          g_record(8'h03, '{{ah, al}, {dh, dl}});
          if ({ah, al} == 16'h8042) dac_model[7] = {dh, dl};
        end else begin
          gwr({ah, al}, dh); gwr({ah, al} + 16'd1, dl);
        end
        gwr(16'h80F6, 8'h01);
        n_fp_store++;
      end
      // request the data pool
      g_record(8'h01, none);
      g_recv(hdr); t0 = cyc;
      g_recv(cnt);
      check("pool header", hdr, 8'h81);
      check("pool word count", cnt, 26);
      sum = hdr + cnt;
      for (int i = 0; i < 26; i++) begin
        logic [7:0] hi, lo;
        logic [15:0] exp_w;
        g_recv(hi); g_recv(lo);
        sum += hi + lo;
        w = {hi, lo};
        if (i < 8)       exp_w = {dac_model[i][15:4], 4'h0};
        else if (i < 11) exp_w = {8'h00, dome_relay_in[i - 8]};
        else if (i < 25) exp_w = {adc_value(i - 11), 8'h00};
        else             exp_w = raise_expected ? dome_fp_data_sw : 16'h0000;
        check($sformatf("pool word %0d", i), w, exp_w);
        if (i == 0) begin gwr(16'h80F8, hi); gwr(16'h80F9, lo); end
        if (i == 25) req = w;
      end
      g_recv(cks); g_recv(z); t1 = cyc;
      check("pool checksum", cks, sum);
      check("pool end byte", z, 0);
      n_pool++;
      // 56 bytes of 11 bits at 20 clocks per bit; 5.3 ms for the pool
      // the pool is read while the ground CPU also writes its hex display
      check_range("pool transfer clocks", t1 - t0, 55 * 220, 53000);
      check("ground hex display shows dome word 0", gnd_fp_hex, {dac_model[0][15:4], 4'h0});
      if (req != 0) begin
        // dome raise/lower request: channel and signed increment in codes
        int ch;
        ch = int'(req[15:8]) % 8;
        dac_model[ch] = dac_model[ch] + 16'({{8{req[7]}}, req[7:0]} << 4);
        g_record(8'h02, '{16'(ch), dac_model[ch]});
        n_raise++;
      end
      $display("data pool of 56 bytes took %0d us", (t1 - t0 + 220) / 10);
      if (cycle == 0) begin
        // a D/A setting for the dome, channel 5 (POS. CUP BIAS)
        g_record(8'h02, '{16'd5, 16'h4560});
        dac_model[5] = 16'h4560;
        // overrun: three bytes while the dome CPU is held
        dome_hold = 1;
        g_send(8'hEE); g_send(8'hEE); g_send(8'hEE);
        repeat (900) @(negedge clk10);
        dome_hold = 0;
        // the dome operator now holds the raise button
        dome_fp_raise = 1; raise_expected = 1;
        // and the ground operator stores 5A50 into the dome's spare D/A
        gnd_fp_toggle_sw = 8'h01; gnd_fp_addr_sw = 16'h8042; gnd_fp_data_sw = 16'h5A50;
        #5us gnd_fp_intr = 1; #5us gnd_fp_intr = 0;
        repeat (2000) @(negedge clk10);
        // framing error: one byte sent while the link is broken
        break_to_dome = 1;
        g_send(8'h55);
        repeat (300) @(negedge clk10);
        break_to_dome = 0;
      end
    end
    ground_done = 1;
  end

  // ---------------- dome CPU model ----------------
  task automatic dwr(logic [15:0] a, logic [7:0] d);
    @(negedge clk_dome); dbus = '{vma: 1'b1, rw: 1'b0, addr: a, wdata: d};
    @(negedge clk_dome); dbus.vma = 1'b0;
  endtask
  task automatic drd(logic [15:0] a, output logic [7:0] d);
    @(negedge clk_dome); dbus = '{vma: 1'b1, rw: 1'b1, addr: a, wdata: 8'h00};
    #1 d = drdata;
    @(negedge clk_dome); dbus.vma = 1'b0;
  endtask
  int n_fe = 0, n_ovrn = 0, n_bad_record = 0, n_setting = 0, n_served = 0, n_dome_store = 0;
  task automatic d_recv(output logic [7:0] b, output bit err);
    logic [7:0] st;
    do begin
      while (dome_hold) @(negedge clk_dome);
      drd(16'h8050, st);
    end while (!st[ST_RDRF]);
    err = st[ST_FE] || st[ST_OVRN] || st[ST_PE];
    if (st[ST_FE])   n_fe++;
    if (st[ST_OVRN]) n_ovrn++;
    drd(16'h8051, b);
  endtask
  task automatic d_send(logic [7:0] b);
    logic [7:0] st;
    do drd(16'h8050, st); while (!st[ST_TDRE]);
    dwr(16'h8051, b);
  endtask

  initial begin : dome_cpu
    logic [7:0] hdr, cnt, b, sum, hi, lo;
    logic [7:0] data [64];
    bit err;
    wait (rst_n);
    repeat (20) @(negedge clk_dome);
    dwr(16'h8050, 8'h03); dwr(16'h8050, 8'h00);
    // initial D/A settings
    for (int ch = 0; ch < 8; ch++) begin
      dac_model[ch] = 16'(16'h1000 * ch + 16'h0120);
      dwr(16'h8010 + 16'(16 * (ch / 2)) + 16'(2 * (ch % 2)), dac_model[ch][15:8]);
      dwr(16'h8011 + 16'(16 * (ch / 2)) + 16'(2 * (ch % 2)), dac_model[ch][7:0]);
    end
    // PIA: port B outputs (A/D channel select), port A inputs
    dwr(16'h8003, 8'h00); dwr(16'h8002, 8'hFF); dwr(16'h8003, 8'h04); dwr(16'h8001, 8'h04);
    // timers, slot 11: CUP ON 1000 x 100 ns from the beam cycle, CUP PULSE
    // WIDTH 500 x 100 ns chained; slot 12 A: 20 CPU clocks from a CPU start
    dwr(16'h80B0, 8'h03); dwr(16'h80B1, 8'hE8); dwr(16'h80B2, 8'b001);
    dwr(16'h80B8, 8'h01); dwr(16'h80B9, 8'hF4); dwr(16'h80BA, 8'b101);
    dwr(16'h80C0, 8'h00); dwr(16'h80C1, 8'd20); dwr(16'h80C2, 8'b010);
    dwr(16'h80C3, 8'h00);
    forever begin
      d_recv(hdr, err);
      if (err) begin n_bad_record++; continue; end
      if (hdr != 8'h01 && hdr != 8'h02 && hdr != 8'h03) begin n_bad_record++; continue; end
      d_recv(cnt, err);
      sum = hdr + cnt;
      if (cnt > 8'd16) begin n_bad_record++; continue; end
      for (int i = 0; i < 2 * int'(cnt); i++) begin d_recv(data[i], err); sum += data[i]; end
      d_recv(b, err);
      if (b != sum) begin n_bad_record++; continue; end
      d_recv(b, err);
      if (hdr == 8'h01) begin
        // data pool: 8 D/A settings, 3 relay status words, 14 A/D channels,
        // the front-panel request
        logic [15:0] pool [26];
        for (int ch = 0; ch < 8; ch++) begin
          drd(16'h8010 + 16'(16 * (ch / 2)) + 16'(2 * (ch % 2)), hi);
          drd(16'h8011 + 16'(16 * (ch / 2)) + 16'(2 * (ch % 2)), lo);
          pool[ch] = {hi, lo};
        end
        for (int k = 0; k < 3; k++) begin
          drd(16'h8081 + 16'(16 * k), lo);
          pool[8 + k] = {8'h00, lo};
        end
        for (int ch = 0; ch < 14; ch++) begin
          dwr(16'h8002, 8'(ch));
          drd(16'h8000, hi);
          pool[11 + ch] = {hi, 8'h00};
        end
        // raise/lower request from the front panel: channel and increment
        drd(16'h80F5, b);
        if (b[1:0] != 2'b00) begin
          drd(16'h80F2, hi); drd(16'h80F3, lo);
          pool[25] = {hi, b[0] ? lo : 8'(-lo)};
        end else begin
          pool[25] = 16'h0000;
        end
        sum = 8'h81 + 8'd26;
        d_send(8'h81); d_send(8'd26);
        for (int i = 0; i < 26; i++) begin
          d_send(pool[i][15:8]); d_send(pool[i][7:0]);
          sum += pool[i][15:8] + pool[i][7:0];
        end
        d_send(sum); d_send(8'h00);
        n_served++;
        dwr(16'h80F8, 8'h00); dwr(16'h80F9, 8'(n_served));
      end else if (hdr == 8'h03) begin
        // store one word at an address
        dwr({data[0], data[1]}, data[2]);
        dwr({data[0], data[1]} + 16'd1, data[3]);
        n_dome_store++;
      end else begin
        int ch;
        ch = int'(data[1]) % 8;
        dwr(16'h8010 + 16'(16 * (ch / 2)) + 16'(2 * (ch % 2)), data[2]);
        dwr(16'h8011 + 16'(16 * (ch / 2)) + 16'(2 * (ch % 2)), data[3]);
        n_setting++;
      end
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    #2us rst_n = 1;
    wait (ground_done);
    // dome reset through the timing link
    #50us reset_dome_req = 1; #20us reset_dome_req = 0;
    #200us;
    // results
    check("D/A setting reached the dome", dome_dac_code[5], 12'h456);
    check("beam cycles seen by the ground station", n_gnd_cycle >= 2, 1);
    check("beam cycles seen by the dome", n_dome_cycle >= 2, 1);
    if (t_gnd_cycle.size() >= 2)
      check_range("15 Hz period (clocks)", t_gnd_cycle[1] - t_gnd_cycle[0], 666660, 666680);
    check("dome CPU reset by the 4-gap", n_dome_reset, 1);
    check("timer started by the beam cycle fired", n_tA >= 2, 1);
    check("timer started by another timer fired", n_tB >= 2, 1);
    check("timer started by the CPU fired", n_tC, 1);
    check("CUP ON delay after the beam cycle", t_tA - t_dome_cycle, 1001);
    check("CUP PULSE WIDTH after CUP ON", t_tB - t_tA, 501);
    check("overrun detected by the dome ACIA", n_ovrn >= 1, 1);
    check("framing error detected by the dome ACIA", n_fe >= 1, 1);
    check("data pools received", n_pool, 2);
    check("settings applied", n_setting, 2);
    check("dome raise request applied", dome_dac_code[3], dac_model[3][15:4]);
    check("raise requests", n_raise, 1);
    check("ground front-panel stores", n_fp_store, 2);
    check("front-panel stores done in the dome", n_dome_store, 1);
    check("front-panel word reached the dome spare D/A", dome_dac_code[7], 12'h5A5);
    check("front-panel word reached the ground D/A", gnd_dac_code[2], 12'h7FF);
    check("dome hex display counts pools", dome_fp_hex, 16'd2);
    $display("mechanisms: beam cycles gnd=%0d dome=%0d, dome resets=%0d, overruns=%0d, framing errors=%0d, timer pulses ext=%0d chained=%0d cpu=%0d, settings=%0d, pools=%0d, raise requests=%0d, panel stores=%0d (dome %0d)",
             n_gnd_cycle, n_dome_cycle, n_dome_reset, n_ovrn, n_fe, n_tA, n_tB, n_tC, n_setting, n_pool, n_raise, n_fp_store, n_dome_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk10);
    failures++;
    $display("watchdog: beam cycles gnd=%0d dome=%0d pools=%0d", n_gnd_cycle, n_dome_cycle, n_pool);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
