// tb_workload_rate -- the whole chip at its default size under the rate the
// chip is specified for: every one of the 64 channels hit at random at a mean
// of 100 kHz (one event per 1600 clocks of 160 MHz), for 60,000 clocks, with
// Compact output at 320 Mb/s (2 bits per clock, 21 clocks per event: up to
// 7.6 Mevents/s on the link against 6.4 Mevents/s offered).
// Hit intervals are 64 clocks plus an exponential wait, so two hits on a
// channel can come closer than a conversion takes and use several TAC pairs.
// Every event is rebuilt from the line and compared with the times driven; a
// trigger lost with all four TAC pairs busy must show as a trig_err pulse and
// is then not expected on the line. The testbench reports the events sent,
// received and lost, the largest data-buffer fill and the link occupancy.
module tb_workload_rate;
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
    repeat (200000) @(posedge clk);
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
    if (q_t[c].size() == 0) begin
      check(1'b0, $sformatf("unexpected event on channel %0d", c));
      return;
    end
    pending--;
    if (!compact) begin
      fine_t = int'(10'(gray2bin(teoc) - gray2bin(soc))) - 2;
      fine_e = int'(10'(gray2bin(eeoc) - gray2bin(soc))) - 2;
      tt = edge_of(int'(gray2bin(tc)), q_t[c][0]) - (real'(fine_t) - 0.5) * T / 128.0;
      te = edge_of(int'(gray2bin(ec)), q_e[c][0]) - (real'(fine_e) - 0.5) * T / 128.0;
      check(te - q_e[c][0] <= T / 128.0 + 2.0 && q_e[c][0] - te <= T / 128.0 + 2.0,
            $sformatf("ch %0d DOE fall rebuilt %0.1f driven %0.1f", c, te, q_e[c][0]));
    end else begin
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
    if (g_cfg.tx_training) begin
      if ((nb == 4 && tx_bits == 4'b1010) || (nb == 2 && tx_bits == 4'b1000)) train_run++;
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

  // lost triggers: the latest hit of that channel is not expected
  int n_lost = 0, n_sent = 0, n_recv0 = 0, max_fill = 0, busy_clocks = 0, run_clocks = 0;
  bit running = 1'b0;
  always @(posedge clk) if (running) begin
    int fill;
    for (int c = 0; c < NC; c++) if (dut.trig_err[c]) begin
      n_lost++;
      void'(q_t[c].pop_back());
      void'(q_e[c].pop_back());
      pending--;
    end
    fill = (int'(dut.u_buf.wr_ptr) - int'(dut.u_buf.rd_ptr) + 32) % 32;
    if (fill > max_fill) max_fill = fill;
    run_clocks++;
    if (rx_bits >= 0) busy_clocks++;
  end

  task automatic channel_stream(input int c, input int clocks);
    realtime t_end = $realtime + real'(clocks) * T;
    forever begin
      int wait_cl;
      real u;
      u = real'($urandom % 1000000 + 1) / 1000000.0;
      wait_cl = 64 + int'(-1536.0 * $ln(u));
      #(real'(wait_cl) * T + real'($urandom % 6250));
      if ($realtime > t_end) break;
      n_sent++;
      hit(c, 1'b1, 1'b1);
    end
  endtask

  initial begin
    g_cfg_t g;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    edge1 = $realtime;
    g = G_CFG_DEFAULT; g.compact = 1'b1; g.tx_rate = 2'd1;
    spi_wr(64, 32'(g));
    repeat (10) @(posedge clk);
    check(g_cfg.compact && g_cfg.tx_rate == 2'd1, "Compact at 320 Mb/s configured");
    running = 1'b1;
    for (int c = 0; c < NC; c++) begin
      automatic int cc = c;
      fork channel_stream(cc, 60000); join_none
    end
    repeat (60000) @(posedge clk);
    drain(20000, "100 kHz per channel");
    running = 1'b0;
    spi_rd(81, d);
    check(int'(d) == n_lost, $sformatf("trigger-error counter %0d, lost triggers seen %0d", d, n_lost));
    $display("events sent=%0d lost=%0d max data-buffer fill=%0d link busy=%0d of %0d clocks",
             n_sent, n_lost, max_fill, busy_clocks, run_clocks);
    check(n_sent > 2000, "enough events offered");
    check(n_lost * 100 < n_sent, "under 1% of triggers lost at 100 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
