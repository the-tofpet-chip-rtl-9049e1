// tb_global_controller -- checks the global controller of an 8-channel chip
// through its pins: the Gray coarse count and frame id, the power-on default
// configuration and a write over SPI, the test pulse selection, the event path
// from the data-buffer handshake to the serial line in Full mode at 1 bit per
// clock and in Compact mode at 4 bits per clock (every slot decoded and compared
// with the event that was offered), and the three status counters read over
// SPI: dark counts and trigger errors summed over channels, clocks with the
// data buffer full, and saturation at 0xFFFF.
module tb_global_controller;
  import tofpet_pkg::*;
  localparam int NC = 8;

  logic clk = 1'b0, rst_n = 1'b1, sync_rst = 1'b0;

  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic ext_tp = 1'b0, tp;
  coarse_t coarse;
  logic frame_id;
  ch_cfg_t ch_cfg [NC];
  g_cfg_t g_cfg;
  logic [5:0] bias_code [N_BIAS];
  logic [NC-1:0] darkcount = '0, trig_err = '0;
  logic buf_full = 1'b0;
  logic ev_valid = 1'b0, ev_ready;
  buf_event_t ev;
  logic [3:0] tx_bits;
  logic clk_out_gate;

  global_controller #(.N_CH(NC)) dut (.clk, .rst_n, .sync_rst, .sck, .cs_n, .mosi, .miso,
    .ext_tp, .coarse, .frame_id, .ch_cfg, .g_cfg, .bias_code, .tp, .darkcount, .trig_err,
    .buf_full, .ev_valid, .ev, .ev_ready, .tx_bits, .clk_out_gate);

  always #50 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SPI master, mode 0, 16 clocks per bit.
  task automatic xfer(input logic [39:0] frame, output logic [31:0] rd);
    rd = '0;
    cs_n = 1'b0;
    #800;
    for (int i = 0; i < 40; i++) begin
      mosi = frame[39 - i];
      #800 sck = 1'b1;
      if (i >= 8) rd = {rd[30:0], miso};
      #800 sck = 1'b0;
    end
    #800 cs_n = 1'b1;
    #1600;
  endtask
  task automatic spi_wr(input int addr, input logic [31:0] d);
    logic [31:0] x;
    xfer({1'b0, 7'(addr), d}, x);
  endtask
  task automatic spi_rd(input int addr, output logic [31:0] d);
    xfer({1'b1, 7'(addr), 32'h0}, d);
  endtask

  // Expected slots, in order.
  logic [SLOT_W-1:0] exp_q [$];
  function automatic coarse_t d10(coarse_t a, coarse_t b);
    return a - b;
  endfunction
  task automatic expect_event(input buf_event_t e, input bit compact);
    if (compact) begin
      exp_q.push_back({1'b1, e.ev.frame_id, e.ch_id, e.ev.tac_id, gray2bin(e.ev.t_coarse),
                       d10(gray2bin(e.ev.t_eoc), gray2bin(e.ev.soc)),
                       d10(gray2bin(e.ev.e_coarse), gray2bin(e.ev.t_coarse))});
    end else begin
      exp_q.push_back({1'b0, e.ev.frame_id, e.ch_id, e.ev.tac_id, e.ev.t_coarse, e.ev.e_coarse,
                       e.ev.soc});
      exp_q.push_back({e.ev.t_eoc, e.ev.e_eoc, 20'b0});
    end
  endtask

  // Line receiver: a start bit, then 40 bits, lanes from bit 3 down.
  int rx_bits = -1, n_slots = 0;
  logic [SLOT_W-1:0] rx_sh;
  always @(posedge clk) if (rst_n && !g_cfg.tx_training) begin
    int nb;
    nb = (g_cfg.tx_rate == 0) ? 1 : (g_cfg.tx_rate == 1) ? 2 : 4;
    for (int i = 3; i > 3 - nb; i--) begin
      if (rx_bits < 0) begin
        if (tx_bits[i]) rx_bits = 0;
      end else begin
        rx_sh = {rx_sh[SLOT_W-2:0], tx_bits[i]};
        rx_bits++;
        if (rx_bits == SLOT_W) begin
          rx_bits = -1;
          n_slots++;
          if (exp_q.size() == 0) check(1'b0, "slot with no event offered");
          else begin
            check(rx_sh == exp_q[0], $sformatf("slot %h expected %h", rx_sh, exp_q[0]));
            void'(exp_q.pop_front());
          end
        end
      end
    end
  end

  // Offer n random events on the data-buffer handshake.
  task automatic send_events(input int n, input bit compact);
    #1;
    for (int k = 0; k < n; k++) begin
      buf_event_t e;
      e = buf_event_t'({$urandom, $urandom});
      e.ch_id = 6'($urandom % NC);
      ev = e;
      ev_valid = 1'b1;
      do @(negedge clk); while (!ev_ready);
      @(posedge clk);
      expect_event(e, compact);
      #1 ev_valid = 1'b0;
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    logic [31:0] d;
    g_cfg_t g;
    int sum_dark, sum_err, n_full;
    coarse_t c0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // time base: Gray count, one bit changing per clock, frame id per wrap
    @(posedge clk); #1;
    c0 = gray2bin(coarse);
    for (int i = 1; i <= 2100; i++) begin
      automatic coarse_t prev_g = coarse;
      automatic bit prev_f = frame_id;
      @(posedge clk); #1;
      check(gray2bin(coarse) == coarse_t'(c0 + i), "coarse count advances by one");
      check($countones(coarse ^ prev_g) == 1, "one Gray bit changes per clock");
      check(frame_id == (prev_f ^ (gray2bin(coarse) == 0)), "frame id toggles at wrap");
    end

    // defaults, then a configuration write
    check(g_cfg == G_CFG_DEFAULT && ch_cfg[3] == CH_CFG_DEFAULT, "power-on default configuration");
    check(clk_out_gate == G_CFG_DEFAULT.clk_out_en, "clock forwarding at its default");
    g = G_CFG_DEFAULT; g.tp_ext_sel = 1'b1; g.clk_out_en = ~G_CFG_DEFAULT.clk_out_en;
    spi_wr(64, 32'(g));
    repeat (5) @(posedge clk);
    check(g_cfg == g, "global configuration written over SPI");
    check(clk_out_gate == g.clk_out_en, "clock forwarding switched");
    ext_tp = 1'b1; #1;
    check(tp, "external test pulse selected");
    ext_tp = 1'b0; #1;
    check(!tp, "external test pulse follows");

    // Full mode at 1 bit per clock
    send_events(20, 1'b0);
    repeat (2000) @(posedge clk);
    check(exp_q.size() == 0 && n_slots == 40, $sformatf("Full: %0d slots received", n_slots));

    // Compact mode at 4 bits per clock; every slot takes 11 clocks
    g.compact = 1'b1; g.tx_rate = 2'd2;
    spi_wr(64, 32'(g));
    repeat (5) @(posedge clk);
    begin
      int t0;
      t0 = n_slots;
      send_events(30, 1'b1);
      repeat (200) @(posedge clk);
      check(exp_q.size() == 0 && n_slots - t0 == 30, $sformatf("Compact: %0d slots", n_slots - t0));
    end
    begin
      // throughput: 10 events offered back to back leave in 10 x 11 clocks
      int k = 0, t_start;
      buf_event_t e;
      #1 ev_valid = 1'b1;
      t_start = n_slots;
      for (int c = 0; c < 110 + 5; c++) begin
        if (ev_valid && ev_ready && k < 10) begin
          expect_event(ev, 1'b1);
          k++;
        end
        @(posedge clk); #1;
        e = buf_event_t'({$urandom, $urandom});
        e.ch_id = 6'($urandom % NC);
        ev = e;
        ev_valid = (k < 10);
      end
      ev_valid = 1'b0;
      check(n_slots - t_start >= 9, $sformatf("Compact 640 Mb/s rate: %0d slots in 115 clocks", n_slots - t_start));
      repeat (50) @(posedge clk);
      check(exp_q.size() == 0, "Compact burst fully received");
    end

    // status counters
    sum_dark = 0; sum_err = 0; n_full = 0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      darkcount = NC'($urandom);
      trig_err  = NC'($urandom);
      buf_full  = $urandom % 2;
      sum_dark += $countones(darkcount);
      sum_err  += $countones(trig_err);
      n_full   += int'(buf_full);
    end
    @(posedge clk); #1;
    darkcount = '0; trig_err = '0; buf_full = 1'b0;
    spi_rd(80, d);
    check(int'(d) == sum_dark, $sformatf("dark-count counter %0d expected %0d", d, sum_dark));
    spi_rd(81, d);
    check(int'(d) == sum_err, $sformatf("trigger-error counter %0d expected %0d", d, sum_err));
    spi_rd(82, d);
    check(int'(d) == n_full, $sformatf("buffer-full counter %0d expected %0d", d, n_full));
    // saturation: all channels in error for 8200 clocks exceeds 0xFFFF
    trig_err = '1;
    repeat (8200) @(posedge clk);
    #1 trig_err = '0;
    spi_rd(81, d);
    check(d == 32'h0000_FFFF, $sformatf("trigger-error counter saturates, read %h", d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
