// tofpet_pkg -- shared constants and records of the TOFPET digital readout.
//
// The chip reads out 64 SiPM channels. Each channel carries a timing and an
// energy branch, each with four time-to-amplitude converters (TACs) used as a
// derandomising buffer, and time stamps events with a 10-bit master clock
// count. The sizes here (64 channels, 10-bit coarse count, four TACs, 2-bit TAC
// id, 6-bit channel id, 50-bit event data) follow the chip. The layout of the
// configuration records and the default DAC codes are this design's own
// choices: the chip's defaults are given in physical units (thresholds of 4 and
// 7 photoelectrons, SiPM baseline of 650 mV, 5 ns energy shaping, PRAEDICTIO
// validation, one synchroniser buffer); the codes below assume a threshold LSB
// of 0.5 photoelectron and a 400-900 mV baseline span over 5 bits.
package tofpet_pkg;

  localparam int unsigned N_CHANNELS = 64;
  localparam int unsigned CH_ID_W    = 6;
  localparam int unsigned COARSE_W   = 10;
  localparam int unsigned N_TAC      = 4;
  localparam int unsigned TAC_ID_W   = 2;
  localparam int unsigned EV_DATA_W  = 5 * COARSE_W;   // 50 bits
  localparam int unsigned SLOT_W     = 40;             // one 5-byte output slot
  localparam int unsigned N_BIAS     = 8;

  typedef logic [COARSE_W-1:0] coarse_t;

  // Hit validation (rejection of dark pulses).
  typedef enum logic [1:0] {
    VAL_SYNC       = 2'd0,   // latched DOT/DOE polled every clock
    VAL_ASYN       = 2'd1,   // analog DOE-DOT gate flags valid/false hit
    VAL_PRAEDICTIO = 2'd2    // delayed DOT masked unless DOE is present
  } val_mode_e;

  // Per-channel configuration (28 bits).
  typedef struct packed {
    logic [1:0]  mon_sel;      // discriminator monitor: 0 off, 1 DOT, 2 delayed DOT, 3 DOE
    logic        shaping_en;   // 5 ns shaping of the energy discriminator input
    logic [5:0]  vth_e;        // energy threshold DAC
    logic [5:0]  vth_t;        // timing threshold DAC
    logic [4:0]  vbl;          // SiPM baseline / fine gain DAC
    logic [1:0]  coarse_gain;  // 0: G0, 1: G0/2, 2: G0/4
    logic        p_type;       // 0: n-type (electron) input, 1: p-type
    logic [1:0]  sync_depth;   // synchroniser buffers, 0..3
    val_mode_e   val_mode;
    logic        mask;         // channel masked (noisy)
  } ch_cfg_t;

  // Global configuration (31 bits).
  typedef struct packed {
    logic        tdc_test;     // test pulse drives the discriminator inputs
    logic        cal_neg;      // calibration pulse polarity
    logic [5:0]  cal_amp;      // calibration DAC amplitude
    logic [5:0]  tp_len;       // internal test pulse length, clocks
    logic [9:0]  tp_pos;       // internal test pulse position in the frame
    logic        tp_ext_sel;   // use the external test pulse
    logic        tp_int_en;    // internal test pulse enable
    logic        clk_out_en;   // forward the clock with the data
    logic        tx_training;  // send the training pattern
    logic [1:0]  tx_rate;      // 0: 1, 1: 2, 2: 4 bits per clock
    logic        compact;      // 0: Full (2 slots), 1: Compact (1 slot)
  } g_cfg_t;

  localparam ch_cfg_t CH_CFG_DEFAULT = '{
    mon_sel: 2'd0, shaping_en: 1'b1, vth_e: 6'd14, vth_t: 6'd8, vbl: 5'd16, coarse_gain: 2'd0,
    p_type: 1'b0, sync_depth: 2'd1, val_mode: VAL_PRAEDICTIO, mask: 1'b0};

  localparam g_cfg_t G_CFG_DEFAULT = '{
    tdc_test: 1'b0, cal_neg: 1'b0, cal_amp: 6'd0, tp_len: 6'd4, tp_pos: 10'd0,
    tp_ext_sel: 1'b0, tp_int_en: 1'b0, clk_out_en: 1'b1, tx_training: 1'b0,
    tx_rate: 2'd0, compact: 1'b0};

  localparam logic [5:0] BIAS_DEFAULT = 6'd32;

  // Event data of one channel, ev data<49:0> = {Tcoarse, Ecoarse, SoC, Teoc, Eeoc},
  // all raw Gray-coded coarse counts.
  typedef struct packed {
    logic [TAC_ID_W-1:0] tac_id;
    logic                frame_id;
    coarse_t             t_coarse;
    coarse_t             e_coarse;
    coarse_t             soc;
    coarse_t             t_eoc;
    coarse_t             e_eoc;
  } ch_event_t;

  // Event in the data buffer: channel id added.
  typedef struct packed {
    logic [CH_ID_W-1:0] ch_id;
    ch_event_t          ev;
  } buf_event_t;

  function automatic coarse_t gray2bin(coarse_t g);
    coarse_t b;
    b[COARSE_W-1] = g[COARSE_W-1];
    for (int i = COARSE_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic coarse_t bin2gray(coarse_t b);
    return b ^ (b >> 1);
  endfunction

endpackage
