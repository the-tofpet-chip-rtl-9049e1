// tb_tofpet_top -- end-to-end test of the 64-channel readout at its default
// size, with behavioural TACs and Wilkinson ADCs on every channel.
//
// The testbench configures the chip over SPI, drives discriminator pulses on
// the channels, decodes the serial output line, and rebuilds from every event
// the trigger time and (Full mode) the DOE falling time, comparing them with
// the times it drove within one fine bin. It runs through: the power-on
// default configuration (PRAEDICTIO, Full, 160 Mb/s); all channels firing at
// once, which fills the data buffer (back-pressure); Compact mode at 640 and
// 320 Mb/s; SYNC and ASYN validation with dark pulses and the dark-count status
// counter; channel masking; a channel hit faster than it converts, so its four
// TAC pairs fill and triggers are lost (trig_err status counter); the training
// pattern; and the TDC test mode fed by the external and internal test pulse.
// Every mechanism is counted and a failure is counted for any that never
// happened.
module tb_tofpet_top;
  timeunit 1ps;
  timeprecision 1ps;
  import tofpet_pkg::*;
  localparam int      NC  = N_CHANNELS;
  localparam realtime T   = 6250.0;
  localparam realtime DLY = 3000.0;

  logic clk = 1'b0, rst_n = 1'b1, sync_rst = 1'b0;

  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic ext_tp = 1'b0, tp;
  logic [NC-1:0] dot = '0, dot_dly = '0, doe = '0, asyn_valid = '0, asyn_false = '0;
  logic [3:0] wtac_t [NC], wtac_e [NC], tac_clr [NC];
  logic [NC-1:0] conv, t_cmp, e_cmp;
  logic mon_out;
  logic [1:0] conv_sel [NC];
  ch_cfg_t ch_cfg [NC];
  g_cfg_t g_cfg;
  logic [5:0] bias_code [N_BIAS];
  logic [3:0] tx_bits;
  logic clk_out_gate;

  tofpet_top dut (.clk, .rst_n, .sync_rst, .sck, .cs_n, .mosi, .miso, .ext_tp, .tp,
    .dot, .dot_dly, .doe, .asyn_valid, .asyn_false, .wtac_t, .wtac_e, .tac_clr,
    .conv, .conv_sel, .t_cmp, .e_cmp, .ch_cfg, .g_cfg, .bias_code, .tx_bits, .clk_out_gate, .mon_out);

  for (genvar c = 0; c < NC; c++) begin : g_adc
    tac_adc_model #(.GAIN(128.0)) u_t (.wtac(wtac_t[c]), .tac_clr(tac_clr[c]), .conv(conv[c]),
                                       .conv_sel(conv_sel[c]), .cmp(t_cmp[c]));
    tac_adc_model #(.GAIN(128.0)) u_e (.wtac(wtac_e[c]), .tac_clr(tac_clr[c]), .conv(conv[c]),
                                       .conv_sel(conv_sel[c]), .cmp(e_cmp[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always #(T/2) clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ time base
  realtime edge1;          // time of the first edge after reset release
  function automatic realtime edge_of(int count, realtime near);
    realtime frame = 1024.0 * T;
    realtime t = edge1 + real'(count - 1) * T;
    while (t - near > frame / 2) t -= frame;
    while (near - t > frame / 2) t += frame;
    return t;
  endfunction

  // --------------------------------------------------------- mechanism counts
  int m_buf_full = 0, m_trig_err = 0, m_dark = 0, m_hold = 0, m_full_ev = 0, m_compact_ev = 0;
  int m_mon = 0;
  int m_training = 0, m_tdc_test = 0, m_sync = 0, m_asyn = 0, m_frame [2] = '{0, 0};
  int m_tac [4] = '{0, 0, 0, 0}, m_rate [3] = '{0, 0, 0}, m_int_tp = 0;
  always @(posedge clk) begin
    if (dut.buf_full) m_buf_full++;
    m_trig_err += $countones(dut.trig_err);
    m_dark     += $countones(dut.darkcount);
  end
  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge clk) if (dut.g_ch[c].u_tdc.u_wgen_t.state == 3'd2) m_hold++;
  end

  // ------------------------------------------------------------------- SPI
  task automatic spi_xfer(input logic [39:0] frame, output logic [31:0] rd);
    rd = '0;
    cs_n = 1'b0;
    #(T * 8);
    for (int i = 0; i < 40; i++) begin
      mosi = frame[39 - i];
      #(T * 8) sck = 1'b1;
      if (i >= 8) rd = {rd[30:0], miso};
      #(T * 8) sck = 1'b0;
    end
    #(T * 8) cs_n = 1'b1;
    #(T * 16);
  endtask
  task automatic spi_wr(input int addr, input logic [31:0] d);
    logic [31:0] x;
    spi_xfer({1'b0, 7'(addr), d}, x);
  endtask
  task automatic spi_rd(input int addr, output logic [31:0] d);
    spi_xfer({1'b1, 7'(addr), 32'h0}, d);
  endtask

  // ------------------------------------------------------ events and checks
  realtime q_t [NC][$];
  realtime q_e [NC][$];
  int pending = 0;
  int tot_span = 24;       // ToT drawn from 12 .. 12+tot_span-1 clocks

  // One event on channel c. has_e: energy threshold crossed; rec: a record is due.
  task automatic hit(input int c, input bit has_e, input bit rec);
    realtime t0, d1, tot, trig;
    d1  = real'($urandom % 2500);
    tot = real'(12 + $urandom % tot_span) * T + real'($urandom % 6250);
    t0  = $realtime;
    trig = (ch_cfg[c].val_mode == VAL_PRAEDICTIO) ? t0 + DLY : t0;
    if (rec) begin
      q_t[c].push_back(trig);
      q_e[c].push_back(t0 + tot);
      pending++;
    end
    dot[c] = 1'b1;
    #(d1) if (has_e) doe[c] = 1'b1;
    #(DLY - d1) dot_dly[c] = 1'b1;
    #(T) if (ch_cfg[c].val_mode == VAL_ASYN) begin
      if (has_e) asyn_valid[c] = 1'b1; else asyn_false[c] = 1'b1;
    end
    #(3 * T) begin asyn_valid[c] = 1'b0; asyn_false[c] = 1'b0; end
    #(t0 + tot - $realtime) doe[c] = 1'b0;
    #(T) dot[c] = 1'b0;
    #(DLY) dot_dly[c] = 1'b0;
  endtask

  task automatic hit_bg(input int c, input bit has_e, input bit rec);
    fork
      hit(c, has_e, rec);
    join_none
  endtask

  // Check a received event against the head of its channel's queue.
  task automatic got_event(input int c, input int tac, input bit frame, input bit compact,
                           input coarse_t tc, input coarse_t ec, input coarse_t soc,
                           input coarse_t teoc, input coarse_t eeoc,
                           input int tfine_c, input int tot_c);
    realtime tt, te;
    int fine_t, fine_e;
    m_tac[tac]++;
    m_frame[frame]++;
    if (q_t[c].size() == 0) begin
      check(1'b0, $sformatf("unexpected event on channel %0d", c));
      return;
    end
    pending--;
    if (!compact) begin
      m_full_ev++;
      fine_t = int'(10'(gray2bin(teoc) - gray2bin(soc))) - 2;
      fine_e = int'(10'(gray2bin(eeoc) - gray2bin(soc))) - 2;
      tt = edge_of(int'(gray2bin(tc)), q_t[c][0]) - (real'(fine_t) - 0.5) * T / 128.0;
      te = edge_of(int'(gray2bin(ec)), q_e[c][0]) - (real'(fine_e) - 0.5) * T / 128.0;
      check(te - q_e[c][0] <= T / 128.0 + 2.0 && q_e[c][0] - te <= T / 128.0 + 2.0,
            $sformatf("ch %0d DOE fall rebuilt %0.1f driven %0.1f", c, te, q_e[c][0]));
    end else begin
      m_compact_ev++;
      fine_t = tfine_c - 2;
      tt = edge_of(int'(tc), q_t[c][0]) - (real'(fine_t) - 0.5) * T / 128.0;
      check(real'(tot_c) * T - (q_e[c][0] - q_t[c][0]) <= 10.0 * T &&
            (q_e[c][0] - q_t[c][0]) - real'(tot_c) * T <= 10.0 * T,
            $sformatf("ch %0d coarse ToT %0d clocks", c, tot_c));
    end
    check(tt - q_t[c][0] <= T / 128.0 + 2.0 && q_t[c][0] - tt <= T / 128.0 + 2.0,
          $sformatf("ch %0d trigger rebuilt %0.1f driven %0.1f", c, tt, q_t[c][0]));
    void'(q_t[c].pop_front());
    void'(q_e[c].pop_front());
  endtask

  // --------------------------------------------------------- line receiver
  int rx_bits = -1;
  logic [SLOT_W-1:0] rx_sh, first_slot;
  bit have_first = 1'b0;
  int train_run = 0;
  always @(posedge clk) if (rst_n) begin
    int nb;
    nb = (g_cfg.tx_rate == 0) ? 1 : (g_cfg.tx_rate == 1) ? 2 : 4;
    m_rate[g_cfg.tx_rate]++;
    if (g_cfg.tx_training) begin
      if ((nb == 4 && tx_bits == 4'b1010) || (nb == 2 && tx_bits == 4'b1000)) train_run++;
      if (train_run == 16) m_training++;
    end else begin
      for (int i = 3; i > 3 - nb; i--) begin
        if (rx_bits < 0) begin
          if (tx_bits[i]) rx_bits = 0;
        end else begin
          rx_sh = {rx_sh[SLOT_W-2:0], tx_bits[i]};
          rx_bits++;
          if (rx_bits == SLOT_W) begin
            rx_bits = -1;
            if (have_first) begin
              have_first = 1'b0;
              got_event(int'(first_slot[37:32]), int'(first_slot[31:30]), first_slot[38], 1'b0,
                        first_slot[29:20], first_slot[19:10], first_slot[9:0],
                        rx_sh[39:30], rx_sh[29:20], 0, 0);
            end else if (rx_sh[39]) begin
              got_event(int'(rx_sh[37:32]), int'(rx_sh[31:30]), rx_sh[38], 1'b1,
                        rx_sh[29:20], '0, '0, '0, '0, int'(rx_sh[19:10]), int'(rx_sh[9:0]));
            end else begin
              first_slot = rx_sh;
              have_first = 1'b1;
            end
          end
        end
      end
    end
  end

  task automatic drain(input int max_clocks, input string phase);
    int k = 0;
    while (pending > 0 && k < max_clocks) begin
      @(posedge clk);
      k++;
    end
    check(pending == 0, $sformatf("%s: %0d events not received", phase, pending));
    repeat (200) @(posedge clk);
  endtask

  function automatic g_cfg_t gcfg(input bit compact, input int rate);
    g_cfg_t g = G_CFG_DEFAULT;
    g.compact = compact;
    g.tx_rate = 2'(rate);
    return g;
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [31:0] d;
    int d0, e0;
    ch_cfg_t cc;
    g_cfg_t g;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    edge1 = $realtime;
    #1;
    // defaults
    check(ch_cfg[17] == CH_CFG_DEFAULT && g_cfg == G_CFG_DEFAULT, "power-on default vector");
    spi_rd(64, d);
    check(d == 32'(G_CFG_DEFAULT), "global configuration read back");

    // 1: all channels at once, Full mode, 160 Mb/s: fills the data buffer
    for (int c = 0; c < NC; c++) begin
      #(real'($urandom % 3000)) hit_bg(c, 1'b1, 1'b1);
    end
    drain(30000, "all channels");
    check(m_buf_full > 0, "data buffer filled");

    // 2: Compact at 640 Mb/s, bursts on a few channels (all TAC ids in use)
    spi_wr(64, 32'(gcfg(1'b1, 2)));
    repeat (10) @(posedge clk);
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < 4; k++) begin
        for (int c = b; c < NC; c += 13) hit_bg(c, 1'b1, 1'b1);
        #(T * 45);
      end
      #(T * 3000);
    end
    drain(30000, "compact bursts");

    // 3: Full at 320 Mb/s, SYNC on channel 5, ASYN on channel 6, channel 7 masked
    spi_wr(64, 32'(gcfg(1'b0, 1)));
    cc = CH_CFG_DEFAULT; cc.val_mode = VAL_SYNC; spi_wr(5, 32'(cc));
    cc = CH_CFG_DEFAULT; cc.val_mode = VAL_ASYN; spi_wr(6, 32'(cc));
    cc = CH_CFG_DEFAULT; cc.mask = 1'b1;         spi_wr(7, 32'(cc));
    repeat (10) @(posedge clk);
    check(ch_cfg[5].val_mode == VAL_SYNC && ch_cfg[6].val_mode == VAL_ASYN && ch_cfg[7].mask,
          "channel configuration written over SPI");
    spi_rd(80, d);
    d0 = int'(d);
    for (int k = 0; k < 10; k++) begin
      automatic bit real_ev = (k % 2 == 0);
      hit_bg(5, real_ev, real_ev);
      hit_bg(6, real_ev, real_ev);
      hit_bg(7, 1'b1, 1'b0);
      if (real_ev) begin m_sync++; m_asyn++; end
      #(T * 600);
    end
    drain(20000, "SYNC/ASYN");
    spi_rd(80, d);
    check(int'(d) - d0 == 10, $sformatf("dark-count status counter +%0d", int'(d) - d0));

    // 4: channel 9 hit faster than it converts: four short hits fill the TAC
    // pairs, the next two triggers are lost, and after the drain the channel
    // records again
    spi_rd(81, d);
    e0 = int'(d);
    tot_span = 3;
    for (int k = 0; k < 6; k++) begin
      hit_bg(9, 1'b1, k < 4);
      #(T * 25);
    end
    drain(20000, "overrun");
    hit_bg(9, 1'b1, 1'b1);
    drain(2000, "after overrun");
    tot_span = 24;
    spi_rd(81, d);
    check(int'(d) - e0 == 2, $sformatf("trigger-error status counter +%0d", int'(d) - e0));

    // 5: training pattern at 640 Mb/s
    g = gcfg(1'b0, 2); g.tx_training = 1'b1;
    spi_wr(64, 32'(g));
    repeat (40) @(posedge clk);
    g.tx_training = 1'b0;
    spi_wr(64, 32'(g));

    // 6: TDC test mode with the external test pulse on all channels
    cc = CH_CFG_DEFAULT;
    for (int c = 5; c <= 7; c++) spi_wr(c, 32'(cc));
    g.tdc_test = 1'b1; g.tp_ext_sel = 1'b1;
    spi_wr(64, 32'(g));
    repeat (10) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      realtime t0, w;
      #(real'($urandom % 6250));
      w = real'(10 + $urandom % 20) * T;
      t0 = $realtime;
      for (int c = 0; c < NC; c++) begin
        q_t[c].push_back(t0);
        q_e[c].push_back(t0 + w);
        pending++;
      end
      ext_tp = 1'b1;
      #(w) ext_tp = 1'b0;
      m_tdc_test++;
      #(T * 1500);
    end
    drain(40000, "TDC test mode");
    // internal test pulse: position 100, 5 clocks, checked on the tp output
    g.tdc_test = 1'b0; g.tp_ext_sel = 1'b0; g.tp_int_en = 1'b1; g.tp_pos = 10'd100; g.tp_len = 6'd5;
    spi_wr(64, 32'(g));
    repeat (2100) @(posedge clk) if (tp) m_int_tp++;
    check(m_int_tp == 10, $sformatf("internal test pulse high %0d clocks in two frames", m_int_tp));

    // mechanisms
    $display("buf_full=%0d trig_err=%0d dark=%0d hold=%0d full=%0d compact=%0d training=%0d tdc_test=%0d sync=%0d asyn=%0d tac=%0d/%0d/%0d/%0d frames=%0d/%0d rates=%0d/%0d/%0d",
             m_buf_full, m_trig_err, m_dark, m_hold, m_full_ev, m_compact_ev, m_training, m_tdc_test,
             m_sync, m_asyn, m_tac[0], m_tac[1], m_tac[2], m_tac[3], m_frame[0], m_frame[1],
             m_rate[0], m_rate[1], m_rate[2]);
    // discriminator monitor: each source of channel 40 alone on the pin; one
    // discriminator alone starts nothing in PRAEDICTIO
    for (int sel = 0; sel < 4; sel++) begin
      cc = CH_CFG_DEFAULT; cc.mon_sel = 2'(sel); spi_wr(40, 32'(cc));
      repeat (5) @(posedge clk);
      for (int src = 1; src < 4; src++) begin
        dot[40] = (src == 1); dot_dly[40] = (src == 2); doe[40] = (src == 3);
        #(T / 3);
        check(mon_out == (sel == src), $sformatf("monitor select %0d, source %0d", sel, src));
        if (mon_out) m_mon++;
        dot[40] = 1'b0; dot_dly[40] = 1'b0; doe[40] = 1'b0;
        #(T / 3);
        check(!mon_out, "monitor idle");
      end
    end
    spi_wr(40, 32'(CH_CFG_DEFAULT));
    check(m_mon == 3, "mechanism: discriminator monitor");
    check(m_buf_full > 0, "mechanism: data buffer full");
    check(m_trig_err > 0, "mechanism: trigger lost with all TACs busy");
    check(m_dark > 0, "mechanism: dark pulse rejected");
    check(m_hold > 0, "mechanism: HOLD (half clock) state");
    check(m_full_ev > 0 && m_compact_ev > 0, "mechanism: Full and Compact modes");
    check(m_training > 0, "mechanism: training pattern");
    check(m_tdc_test > 0, "mechanism: TDC test mode");
    check(m_sync > 0 && m_asyn > 0, "mechanism: SYNC and ASYN validation");
    check(m_tac[0] > 0 && m_tac[1] > 0 && m_tac[2] > 0 && m_tac[3] > 0, "mechanism: all four TAC pairs");
    check(m_frame[0] > 0 && m_frame[1] > 0, "mechanism: both frame ids");
    check(m_rate[0] > 0 && m_rate[1] > 0 && m_rate[2] > 0, "mechanism: all three output rates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
