// tofpet_top -- digital part of the 64-channel TOFPET readout chip.
//
// Each of the N_CH channels has an analog front end whose timing and energy
// discriminators (DOT, DOE) drive a tdc_ctrl; the TDC controller writes and
// converts the channel's four TAC pairs through the tac/conv ports and stores
// finished events in its channel data register. The data buffer collects those
// events round robin into a FIFO, and the global controller packs them into
// slots and sends them on the serial link, while also providing the coarse time
// base, the SPI configuration and the test pulse. The analog parts (front end,
// discriminators, DOT delay line, ASYN gate, TACs, Wilkinson ADCs, calibration
// and bias DACs, LVDS pads) are outside this module: their signals are ports,
// and the analog settings come out on ch_cfg, g_cfg and bias_code.
// In TDC test mode (g_cfg.tdc_test) the test pulse replaces DOT, delayed DOT and
// DOE of every channel, so the TDCs can be tested without the front end.
// Each channel's mon_sel field puts its DOT, delayed DOT (before and after the
// delay line) or DOE on mon_out, the OR over channels; the field, its encoding
// and the shared pin are this design's own.
// Everything runs on the master clock clk (160 MHz on the chip); DOT, DOE,
// the comparators and ext_tp are asynchronous.
module tofpet_top
  import tofpet_pkg::*;
#(
  parameter int unsigned N_CH = N_CHANNELS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sync_rst,
  // SPI configuration link
  input  logic               sck,
  input  logic               cs_n,
  input  logic               mosi,
  output logic               miso,
  // test pulse
  input  logic               ext_tp,
  output logic               tp,
  // discriminators and analog validation flags
  input  logic [N_CH-1:0]    dot,
  input  logic [N_CH-1:0]    dot_dly,
  input  logic [N_CH-1:0]    doe,
  input  logic [N_CH-1:0]    asyn_valid,
  input  logic [N_CH-1:0]    asyn_false,
  // TACs and ADCs
  output logic [N_TAC-1:0]   wtac_t   [N_CH],
  output logic [N_TAC-1:0]   wtac_e   [N_CH],
  output logic [N_TAC-1:0]   tac_clr  [N_CH],
  output logic [N_CH-1:0]    conv,
  output logic [TAC_ID_W-1:0] conv_sel [N_CH],
  input  logic [N_CH-1:0]    t_cmp,
  input  logic [N_CH-1:0]    e_cmp,
  // analog settings
  output ch_cfg_t            ch_cfg    [N_CH],
  output g_cfg_t             g_cfg,
  output logic [5:0]         bias_code [N_BIAS],
  // data output
  output logic [3:0]         tx_bits,
  output logic               clk_out_gate,
  // discriminator monitor
  output logic               mon_out
);

  coarse_t         coarse;
  logic            frame_id;
  logic [N_CH-1:0] ev_valid, ev_ack, darkcount, trig_err;
  ch_event_t       ev [N_CH];
  logic            buf_valid, buf_ready, buf_full;
  buf_event_t      buf_ev;
  logic [N_CH-1:0] mon;

  for (genvar c = 0; c < int'(N_CH); c++) begin : g_ch
    logic c_dot, c_dot_dly, c_doe;
    assign c_dot     = g_cfg.tdc_test ? tp : dot[c];
    assign c_dot_dly = g_cfg.tdc_test ? tp : dot_dly[c];
    assign c_doe     = g_cfg.tdc_test ? tp : doe[c];

    always_comb begin
      case (ch_cfg[c].mon_sel)
        2'd1:    mon[c] = c_dot;
        2'd2:    mon[c] = c_dot_dly;
        2'd3:    mon[c] = c_doe;
        default: mon[c] = 1'b0;
      endcase
    end

    tdc_ctrl u_tdc (
      .clk, .rst_n, .coarse, .frame_id, .cfg(ch_cfg[c]),
      .dot(c_dot), .dot_dly(c_dot_dly), .doe(c_doe),
      .asyn_valid(asyn_valid[c]), .asyn_false(asyn_false[c]),
      .wtac_t(wtac_t[c]), .wtac_e(wtac_e[c]), .tac_clr(tac_clr[c]),
      .conv(conv[c]), .conv_sel(conv_sel[c]), .t_cmp(t_cmp[c]), .e_cmp(e_cmp[c]),
      .ev_valid(ev_valid[c]), .ev(ev[c]), .ev_ack(ev_ack[c]),
      .darkcount(darkcount[c]), .trig_err(trig_err[c]));
  end

  // The selected discriminator outputs of all channels share one pin,
  // unregistered so that their timing and jitter can be observed.
  assign mon_out = |mon;

  data_buffer #(.N_CH(N_CH)) u_buf (
    .clk, .rst_n, .ev_valid, .ev, .ev_ack,
    .out_valid(buf_valid), .out(buf_ev), .out_ready(buf_ready), .full(buf_full));

  global_controller #(.N_CH(N_CH)) u_gctrl (
    .clk, .rst_n, .sync_rst, .sck, .cs_n, .mosi, .miso, .ext_tp,
    .coarse, .frame_id, .ch_cfg, .g_cfg, .bias_code, .tp,
    .darkcount, .trig_err, .buf_full,
    .ev_valid(buf_valid), .ev(buf_ev), .ev_ready(buf_ready),
    .tx_bits, .clk_out_gate);

endmodule
