// tb_tdc_ctrl -- end-to-end check of one channel's TDC controller with
// behavioural TACs and Wilkinson ADCs (tac_adc_model, gain 128).
//
// Events are drawn with random trigger phase, DOE delay and time over
// threshold. From every record the testbench rebuilds the trigger time,
// t = edge(Tcoarse) - (Teoc - SoC - 2) x T/128, and the DOE falling time the
// same way from Ecoarse and Eeoc, and compares them with the times it drove,
// allowing one fine bin (T/128). It also checks round-robin TAC ids, the
// capacity of 4 TAC pairs + 1 register (the sixth event of a stalled burst is
// lost and flagged by trig_err), dark-count rejection in SYNC and ASYN modes,
// PRAEDICTIO masking of lone DOT pulses, channel masking, and all synchroniser
// depths.
module tb_tdc_ctrl;
  timeunit 1ps;
  timeprecision 1ps;
  import tofpet_pkg::*;
  localparam realtime T   = 6250.0;
  localparam realtime DLY = 3000.0;     // DOT delay line used by PRAEDICTIO

  logic clk = 1'b0, rst_n = 1'b1;

  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  int unsigned cyc = 0;
  coarse_t coarse = '0;
  ch_cfg_t cfg = CH_CFG_DEFAULT;
  logic dot = 1'b0, dot_dly = 1'b0, doe = 1'b0, asyn_valid = 1'b0, asyn_false = 1'b0;
  logic [3:0] wtac_t, wtac_e, tac_clr;
  logic conv;
  logic [1:0] conv_sel;
  logic t_cmp, e_cmp, ev_valid, ev_ack, darkcount, trig_err;
  logic ack_en = 1'b1;
  ch_event_t ev;
  int checks = 0, failures = 0;
  int n_dark = 0, n_err = 0, n_rec = 0, n_wtac = 0, n_hcc_hold = 0;
  int max_busy = 0;
  realtime q_t [$], q_e [$];
  int next_id = 0;

  tdc_ctrl dut (.clk, .rst_n, .coarse, .frame_id(1'b0), .cfg, .dot, .dot_dly, .doe,
    .asyn_valid, .asyn_false, .wtac_t, .wtac_e, .tac_clr, .conv, .conv_sel,
    .t_cmp, .e_cmp, .ev_valid, .ev, .ev_ack, .darkcount, .trig_err);

  tac_adc_model #(.GAIN(128.0)) u_adc_t (.wtac(wtac_t), .tac_clr, .conv, .conv_sel, .cmp(t_cmp));
  tac_adc_model #(.GAIN(128.0)) u_adc_e (.wtac(wtac_e), .tac_clr, .conv, .conv_sel, .cmp(e_cmp));

  always #(T/2) clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    coarse <= bin2gray(10'(cyc));
  end

  assign ev_ack = ev_valid & ack_en;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time of the edge after which the coarse count reads x, folded near `near`
  function automatic realtime fold(realtime t, realtime near);
    realtime frame = 1024.0 * T;
    while (t - near > frame / 2) t -= frame;
    while (near - t > frame / 2) t += frame;
    return t;
  endfunction

  function automatic realtime rebuild(coarse_t c, coarse_t eoc, coarse_t soc, realtime near);
    int fine = int'(10'(gray2bin(eoc) - gray2bin(soc))) - 2;
    realtime edge_t = (real'(gray2bin(c)) - 0.5) * T;
    return fold(edge_t - (real'(fine) - 0.5) * T / 128.0, near);
  endfunction

  always @(posedge clk) begin
    if (darkcount) n_dark++;
    if (trig_err)  n_err++;
    if ($countones(dut.busy) > max_busy) max_busy = $countones(dut.busy);
    if (dut.u_wgen_t.state == dut.u_wgen_t.HOLD) n_hcc_hold++;
    if (ev_valid && ev_ack) begin
      realtime tt, te;
      n_rec++;
      check(q_t.size() > 0, "record expected");
      if (q_t.size() > 0) begin
        tt = rebuild(ev.t_coarse, ev.t_eoc, ev.soc, q_t[0]);
        te = rebuild(ev.e_coarse, ev.e_eoc, ev.soc, q_e[0]);
        check(tt - q_t[0] <= T / 128.0 + 2.0 && q_t[0] - tt <= T / 128.0 + 2.0,
              $sformatf("trigger time rebuilt %0.1f, driven %0.1f", tt, q_t[0]));
        check(te - q_e[0] <= T / 128.0 + 2.0 && q_e[0] - te <= T / 128.0 + 2.0,
              $sformatf("DOE fall rebuilt %0.1f, driven %0.1f", te, q_e[0]));
        check(int'(ev.tac_id) == next_id, $sformatf("TAC id %0d expected %0d", ev.tac_id, next_id));
        next_id = (next_id + 1) % 4;
        void'(q_t.pop_front());
        void'(q_e.pop_front());
      end
    end
  end

  always @(posedge (|wtac_t)) n_wtac++;
  always @(posedge clk) begin
    check($countones(wtac_t) <= 1 && $countones(wtac_e) <= 1, "one TAC written at a time");
  end

  // One event. has_e: DOE crosses the energy threshold. expect: a record is due.
  task automatic event_(input bit has_e, input bit expect_rec);
    realtime t0, d1, tot, trig;
    d1  = real'($urandom % 2500);
    tot = real'(12 + $urandom % 24) * T + real'($urandom % 6250);
    t0  = $realtime;
    trig = (cfg.val_mode == VAL_PRAEDICTIO) ? t0 + DLY : t0;
    if (expect_rec) begin
      q_t.push_back(trig);
      q_e.push_back(t0 + tot);
    end
    dot = 1'b1;
    #(d1) if (has_e) doe = 1'b1;
    #(DLY - d1) dot_dly = 1'b1;
    #(T) if (cfg.val_mode == VAL_ASYN) begin
      if (has_e) asyn_valid = 1'b1; else asyn_false = 1'b1;
    end
    #(3 * T) asyn_valid = 1'b0; asyn_false = 1'b0;
    #(t0 + tot - $realtime) doe = 1'b0;
    #(T) dot = 1'b0;
    #(DLY) dot_dly = 1'b0;
  endtask

  task automatic gap(input int clocks);
    #(real'(clocks) * T + real'($urandom % 6250));
  endtask

  initial begin
    int w0, d0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    gap(5);
    // A: PRAEDICTIO, bursts of four close events, every synchroniser depth
    for (int b = 0; b < 8; b++) begin
      cfg.sync_depth = 2'(b % 4);
      gap(10);
      for (int k = 0; k < 4; k++) begin
        event_(1'b1, 1'b1);
        gap(30);
      end
      gap(3500);
    end
    check(q_t.size() == 0, "phase A records all out");
    check(max_busy == 4, $sformatf("all four TAC pairs used (max %0d)", max_busy));
    // B: stalled readout, 6 events: 4 TAC pairs + 1 register hold 5
    cfg.sync_depth = 2'd1;
    ack_en = 1'b0;
    for (int k = 0; k < 6; k++) begin
      event_(1'b1, k < 5);
      gap(500);
    end
    check(n_err == 1, $sformatf("one lost trigger flagged (trig_err %0d)", n_err));
    ack_en = 1'b1;
    gap(2500);
    check(q_t.size() == 0, "phase B records all out");
    // C: SYNC with dark pulses
    cfg.val_mode = VAL_SYNC;
    gap(5);
    d0 = n_dark;
    for (int k = 0; k < 12; k++) begin
      event_(k % 3 != 1, k % 3 != 1);
      gap(500);
    end
    check(n_dark - d0 == 4, $sformatf("SYNC dark counts %0d", n_dark - d0));
    gap(2500);
    check(q_t.size() == 0, "phase C records all out");
    // D: ASYN
    cfg.val_mode = VAL_ASYN;
    gap(5);
    d0 = n_dark;
    for (int k = 0; k < 12; k++) begin
      event_(k % 4 != 2, k % 4 != 2);
      gap(500);
    end
    check(n_dark - d0 == 3, $sformatf("ASYN dark counts %0d", n_dark - d0));
    gap(2500);
    check(q_t.size() == 0, "phase D records all out");
    // E: PRAEDICTIO lone DOT pulses write nothing
    cfg.val_mode = VAL_PRAEDICTIO;
    w0 = n_wtac; d0 = n_dark;
    for (int k = 0; k < 4; k++) begin
      event_(1'b0, 1'b0);
      gap(100);
    end
    check(n_wtac == w0 && n_dark == d0, "PRAEDICTIO masks lone DOT");
    // F: masked channel
    cfg.mask = 1'b1;
    w0 = n_wtac;
    for (int k = 0; k < 3; k++) begin
      event_(1'b1, 1'b0);
      gap(100);
    end
    check(n_wtac == w0, "masked channel writes nothing");
    cfg.mask = 1'b0;
    gap(50);
    event_(1'b1, 1'b1);
    gap(600);
    check(q_t.size() == 0, "all records out");
    check(n_hcc_hold > 0, "HOLD state (hcc=1) exercised");
    $display("records %0d dark %0d lost %0d hold %0d", n_rec, n_dark, n_err, n_hcc_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
