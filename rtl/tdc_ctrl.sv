// tdc_ctrl -- digital TDC controller of one channel.
//
// A channel measures two times per event: t0, the rising edge of the timing
// discriminator (DOT), and t2, the falling edge of the energy discriminator
// (DOE); t2 - t0 is the time over threshold that measures the energy. Each time
// is kept as a coarse count (the Gray-coded master clock count of the clock
// edge that ended the TAC write) plus a fine part: the TAC charges from the
// trigger to that edge, and a Wilkinson ADC later discharges it 128 times more
// slowly, so the fine time is read as the clock count from start of conversion
// (SoC) to end of conversion (EoC).
//
// How it works. Three trigger latches capture DOT (or, in PRAEDICTIO mode, the
// delayed DOT gated by DOE), the DOE rising edge (DOEL, for SYNC validation) and
// the DOE falling edge. Two wtac_generator machines write the timing and energy
// TAC of the current TAC pair. Four TAC pairs form a derandomising buffer,
// allocated round robin. An event walks through the acquisition machine:
//   A_IDLE   - timing branch armed when the current pair is free and the
//              channel is not masked;
//   A_T      - timing TAC written (Tcoarse kept); wait for the hit decision:
//              SYNC uses sync_validation, ASYN the synchronised analog
//              validhit/falsehit flags, PRAEDICTIO accepts at once;
//   A_WAIT_E - valid hit: wait until the DOE falling edge is written
//              (Ecoarse kept); the pair is queued for conversion and the
//              allocation pointer advances. The energy branch is armed from
//              A_T on, so an early DOE fall is kept.
// A false hit, or no decision or energy edge within DECISION_TIMEOUT clocks,
// frees the pair (tac_clr pulse) and pulses darkcount (false hit or no
// decision) or trig_err (no energy edge). A timing trigger that arrives while
// the current pair is still occupied is lost and pulses trig_err.
// The conversion machine takes queued pairs in allocation order: it records SoC
// and raises conv with conv_sel, then records Teoc and Eeoc from the
// synchronised comparators (or at CONV_TIMEOUT), drops conv, and moves the
// event into the channel data register, where it waits for ev_ack. A full
// register stalls conversions; stalled conversions fill the four pairs.
// Timing: wtac_t/wtac_e rise with the trigger, without waiting for a clock. With
// one synchroniser buffer the TAC write ends 2 clocks (3 with hcc) after the
// trigger's clock; Teoc/Eeoc are 2 clocks late because of the comparator
// synchronisers, a constant removed by calibration.
// Following the chip: the two branches, quad TAC buffering, the three
// validation modes, a shared TAC id for both branches, the time reference of
// the energy branch on the DOE falling edge, one SoC for both conversions, the
// event fields, round-robin allocation, channel masking. This design's own:
// the acquisition and conversion machines, the timeouts, arming the energy
// branch from the end of the timing TAC write on, and the meaning of darkcount
// and trig_err.
module tdc_ctrl
  import tofpet_pkg::*;
#(
  parameter int unsigned CONV_TIMEOUT     = 1023,
  parameter int unsigned DECISION_TIMEOUT = 255
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coarse_t          coarse,
  input  logic             frame_id,
  input  ch_cfg_t          cfg,
  input  logic             dot,
  input  logic             dot_dly,
  input  logic             doe,
  input  logic             asyn_valid,
  input  logic             asyn_false,
  output logic [N_TAC-1:0] wtac_t,
  output logic [N_TAC-1:0] wtac_e,
  output logic [N_TAC-1:0] tac_clr,
  output logic             conv,
  output logic [TAC_ID_W-1:0] conv_sel,
  input  logic             t_cmp,
  input  logic             e_cmp,
  output logic             ev_valid,
  output ch_event_t        ev,
  input  logic             ev_ack,
  output logic             darkcount,
  output logic             trig_err
);

  typedef enum logic [1:0] {A_IDLE, A_T, A_WAIT_E} acq_e;
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DONE} conv_e;

  acq_e  acq;
  conv_e cst;

  logic [TAC_ID_W-1:0] wr_ptr, rd_ptr;
  logic [N_TAC-1:0]    busy, ready;
  coarse_t             t_coarse_q [N_TAC];
  coarse_t             e_coarse_q [N_TAC];
  logic [N_TAC-1:0]    frame_q;

  // ---------------------------------------------------------------- triggers
  logic t_src;
  assign t_src = cfg.mask ? 1'b0 :
                 (cfg.val_mode == VAL_PRAEDICTIO) ? (dot_dly & doe) : dot;

  logic t_disc, t_hcc, t_syn, t_clr;
  logic el_disc, el_hcc, el_syn, el_clr;
  logic e_disc, e_hcc, e_syn, e_clr;

  trigger_latch #(.FALLING(1'b0)) u_lat_t (
    .clk, .rst_n, .disc(t_src), .clr(t_clr), .depth(cfg.sync_depth),
    .disc_out(t_disc), .hcc(t_hcc), .latched_syn(t_syn));

  trigger_latch #(.FALLING(1'b0)) u_lat_el (
    .clk, .rst_n, .disc(doe), .clr(el_clr), .depth(cfg.sync_depth),
    .disc_out(el_disc), .hcc(el_hcc), .latched_syn(el_syn));

  trigger_latch #(.FALLING(1'b1)) u_lat_e (
    .clk, .rst_n, .disc(doe), .clr(e_clr), .depth(cfg.sync_depth),
    .disc_out(e_disc), .hcc(e_hcc), .latched_syn(e_syn));

  // ------------------------------------------------------ TAC write control
  logic t_wtac, t_wtacn, t_stopramp, t_stop, t_armed, t_en, t_fired;
  logic e_wtac, e_wtacn, e_stopramp, e_stop, e_armed, e_en;

  assign t_fired = busy[wr_ptr];
  assign t_en    = (acq == A_IDLE) && !cfg.mask;
  // The energy branch is armed as soon as the timing TAC is written, so a DOE
  // falling edge during the hit decision is not missed; it writes once.
  logic e_written;
  assign e_en    = ((acq == A_T) || (acq == A_WAIT_E)) && !e_written;

  wtac_generator u_wgen_t (
    .clk, .rst_n, .doxl_syn(t_syn), .hcc(t_hcc), .disc_out(t_disc),
    .fired_tac(t_fired), .wtac_en(t_en), .wtac(t_wtac), .wtacn(t_wtacn),
    .stopramp(t_stopramp), .latch_clr(t_clr), .stop_pulse(t_stop), .armed(t_armed));

  wtac_generator u_wgen_e (
    .clk, .rst_n, .doxl_syn(e_syn), .hcc(e_hcc), .disc_out(e_disc),
    .fired_tac(1'b0), .wtac_en(e_en), .wtac(e_wtac), .wtacn(e_wtacn),
    .stopramp(e_stopramp), .latch_clr(e_clr), .stop_pulse(e_stop), .armed(e_armed));

  always_comb begin
    wtac_t = '0;
    wtac_e = '0;
    wtac_t[wr_ptr] = t_wtac;
    wtac_e[wr_ptr] = e_wtac;
  end

  // ------------------------------------------------------------ validation
  logic validhit, falsehit;

  sync_validation u_sval (
    .clk, .rst_n, .dotl_syn(t_syn), .doel_syn(el_syn),
    .validhit, .falsehit);

  assign el_clr = validhit | falsehit | (cfg.val_mode != VAL_SYNC);

  logic [1:0] av_s, af_s;
  logic       av_q, af_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      av_s <= '0; af_s <= '0; av_q <= 1'b0; af_q <= 1'b0;
    end else begin
      av_s <= {av_s[0], asyn_valid};
      af_s <= {af_s[0], asyn_false};
      av_q <= av_s[1];
      af_q <= af_s[1];
    end
  end

  logic ok_ev, bad_ev;
  always_comb begin
    unique case (cfg.val_mode)
      VAL_SYNC:       begin ok_ev = validhit;          bad_ev = falsehit;          end
      VAL_ASYN:       begin ok_ev = av_s[1] & ~av_q;   bad_ev = af_s[1] & ~af_q;   end
      VAL_PRAEDICTIO: begin ok_ev = 1'b1;              bad_ev = 1'b0;              end
      default:        begin ok_ev = 1'b1;              bad_ev = 1'b0;              end
    endcase
  end

  // Decision flags, collected from the moment the timing latch fires.
  logic v_ok, v_bad;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_ok  <= 1'b0;
      v_bad <= 1'b0;
    end else if (acq == A_IDLE && t_armed && !t_disc) begin
      v_ok  <= 1'b0;
      v_bad <= 1'b0;
    end else if (acq != A_WAIT_E) begin
      if (ok_ev)  v_ok  <= 1'b1;
      if (bad_ev) v_bad <= 1'b1;
    end
  end

  // Lost timing trigger: DOT rising while the current pair is still occupied.
  logic [2:0] dot_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dot_s <= '0;
    else        dot_s <= {dot_s[1:0], t_src};
  end

  // ------------------------------------------------------ acquisition FSM
  logic [$clog2(DECISION_TIMEOUT+1)-1:0] wait_cnt;
  logic                                  wait_over;
  logic                                  queue_ev, discard_ev;
  assign wait_over = (int'(wait_cnt) == DECISION_TIMEOUT);

  always_comb begin
    queue_ev   = (acq == A_WAIT_E) && (e_stop || e_written);
    discard_ev = ((acq == A_T) && !v_ok && (v_bad || wait_over)) ||
                 ((acq == A_WAIT_E) && !queue_ev && wait_over);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq       <= A_IDLE;
      wr_ptr    <= '0;
      wait_cnt  <= '0;
      e_written <= 1'b0;
      darkcount <= 1'b0;
      trig_err  <= 1'b0;
      tac_clr   <= '0;
      frame_q   <= '0;
      for (int i = 0; i < int'(N_TAC); i++) begin
        t_coarse_q[i] <= '0;
        e_coarse_q[i] <= '0;
      end
    end else begin
      darkcount <= 1'b0;
      trig_err  <= dot_s[1] & ~dot_s[2] & t_fired & (acq == A_IDLE) & ~cfg.mask;
      tac_clr   <= '0;
      wait_cnt  <= (acq == A_IDLE || wait_over) ? '0 : wait_cnt + 1'b1;
      if (e_stop) begin
        e_coarse_q[wr_ptr] <= coarse;
        e_written          <= 1'b1;
      end
      unique case (acq)
        A_IDLE: if (t_stop) begin
          t_coarse_q[wr_ptr] <= coarse;
          frame_q[wr_ptr]    <= frame_id;
          acq                <= A_T;
        end
        A_T: begin
          if (v_ok) begin
            acq      <= A_WAIT_E;
            wait_cnt <= '0;
          end else if (discard_ev) begin
            acq             <= A_IDLE;
            e_written       <= 1'b0;
            darkcount       <= 1'b1;
            tac_clr[wr_ptr] <= 1'b1;
          end
        end
        A_WAIT_E: begin
          if (queue_ev) begin
            wr_ptr    <= wr_ptr + 1'b1;
            acq       <= A_IDLE;
            e_written <= 1'b0;
          end else if (discard_ev) begin
            acq             <= A_IDLE;
            e_written       <= 1'b0;
            trig_err        <= 1'b1;
            tac_clr[wr_ptr] <= 1'b1;
          end
        end
        default: acq <= A_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- conversion FSM
  logic [1:0] tc_s, ec_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc_s <= '0;
      ec_s <= '0;
    end else begin
      tc_s <= {tc_s[0], t_cmp};
      ec_s <= {ec_s[0], e_cmp};
    end
  end

  coarse_t soc_q, teoc_q, eoc_e_q;
  logic    t_done, e_done;
  logic [$clog2(CONV_TIMEOUT+1)-1:0] conv_cnt;
  logic    load_reg;

  assign conv     = (cst == C_RUN);
  assign load_reg = (cst == C_DONE) && !ev_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst      <= C_IDLE;
      rd_ptr   <= '0;
      conv_sel <= '0;
      soc_q    <= '0;
      teoc_q   <= '0;
      eoc_e_q  <= '0;
      t_done   <= 1'b0;
      e_done   <= 1'b0;
      conv_cnt <= '0;
    end else begin
      unique case (cst)
        C_IDLE: if (ready[rd_ptr] && !tc_s[1] && !ec_s[1]) begin
          soc_q    <= coarse;
          conv_sel <= rd_ptr;
          t_done   <= 1'b0;
          e_done   <= 1'b0;
          conv_cnt <= '0;
          cst      <= C_RUN;
        end
        C_RUN: begin
          conv_cnt <= conv_cnt + 1'b1;
          if (tc_s[1] && !t_done) begin t_done <= 1'b1; teoc_q  <= coarse; end
          if (ec_s[1] && !e_done) begin e_done <= 1'b1; eoc_e_q <= coarse; end
          if (int'(conv_cnt) == CONV_TIMEOUT) begin
            if (!t_done) teoc_q  <= coarse;
            if (!e_done) eoc_e_q <= coarse;
            cst <= C_DONE;
          end else if ((t_done || tc_s[1]) && (e_done || ec_s[1])) begin
            cst <= C_DONE;
          end
        end
        C_DONE: if (load_reg) begin
          rd_ptr <= rd_ptr + 1'b1;
          cst    <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------- TAC pair state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= '0;
      ready <= '0;
    end else begin
      if (acq == A_IDLE && t_stop) busy[wr_ptr]  <= 1'b1;
      if (discard_ev)              busy[wr_ptr]  <= 1'b0;
      if (queue_ev)                ready[wr_ptr] <= 1'b1;
      if (load_reg) begin
        busy[rd_ptr]  <= 1'b0;
        ready[rd_ptr] <= 1'b0;
      end
    end
  end

  // ------------------------------------------------- channel data register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_valid <= 1'b0;
      ev       <= '0;
    end else if (load_reg) begin
      ev_valid    <= 1'b1;
      ev.tac_id   <= rd_ptr;
      ev.frame_id <= frame_q[rd_ptr];
      ev.t_coarse <= t_coarse_q[rd_ptr];
      ev.e_coarse <= e_coarse_q[rd_ptr];
      ev.soc      <= soc_q;
      ev.t_eoc    <= teoc_q;
      ev.e_eoc    <= eoc_e_q;
    end else if (ev_ack) begin
      ev_valid <= 1'b0;
    end
  end

  // The two branches always write the same TAC pair.
  a_one_pair: assert property (@(posedge clk) disable iff (!rst_n) !(t_wtac && e_wtac));

endmodule
