// global_controller -- GCTRL: time base, configuration, test pulse and output.
//
// Distributes the Gray-coded 10-bit coarse count and the frame id to all
// channels (coarse_counter), holds the configuration loaded over SPI with its
// power-on default (spi_config), generates the test pulse (test_pulse_gen), and
// forms the output buffer: events popped from the data buffer are packed into
// 40-bit slots (event_formatter) and sent on the serial link (tx_serializer).
// Three 16-bit saturating status counters, readable over SPI at addresses
// 80..82, count rejected dark pulses, trigger errors of all channels, and
// clocks in which the data buffer was full.
// Following the chip: a global controller with coarse counter, output buffer,
// SPI configuration with default vector, internal test pulse. This design's
// own: the status counters and the partitioning into sub-blocks.
module global_controller
  import tofpet_pkg::*;
#(
  parameter int unsigned N_CH = N_CHANNELS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sync_rst,
  input  logic            sck,
  input  logic            cs_n,
  input  logic            mosi,
  output logic            miso,
  input  logic            ext_tp,
  output coarse_t         coarse,
  output logic            frame_id,
  output ch_cfg_t         ch_cfg    [N_CH],
  output g_cfg_t          g_cfg,
  output logic [5:0]      bias_code [N_BIAS],
  output logic            tp,
  input  logic [N_CH-1:0] darkcount,
  input  logic [N_CH-1:0] trig_err,
  input  logic            buf_full,
  input  logic            ev_valid,
  input  buf_event_t      ev,
  output logic            ev_ready,
  output logic [3:0]      tx_bits,
  output logic            clk_out_gate
);

  coarse_t coarse_bin;

  coarse_counter #(.W(COARSE_W)) u_cnt (
    .clk, .rst_n, .sync_rst, .gray(coarse), .bin(coarse_bin), .frame_id);

  logic [15:0] status [3];

  spi_config #(.N_CH(N_CH), .NB(N_BIAS)) u_spi (
    .clk, .rst_n, .sck, .cs_n, .mosi, .miso, .ch_cfg, .g_cfg, .bias_code, .status);

  test_pulse_gen u_tp (
    .clk, .rst_n, .coarse_bin, .int_en(g_cfg.tp_int_en), .ext_sel(g_cfg.tp_ext_sel),
    .pos(g_cfg.tp_pos), .len(g_cfg.tp_len), .ext_tp, .tp);

  logic              slot_valid, slot_ready;
  logic [SLOT_W-1:0] slot;

  event_formatter u_fmt (
    .clk, .rst_n, .compact(g_cfg.compact), .in_valid(ev_valid), .in(ev), .in_ready(ev_ready),
    .slot_valid, .slot, .slot_ready);

  tx_serializer u_tx (
    .clk, .rst_n, .rate(g_cfg.tx_rate), .training(g_cfg.tx_training), .clk_out_en(g_cfg.clk_out_en),
    .slot_valid, .slot, .slot_ready, .tx_bits, .clk_out_gate);

  // Status counters.
  logic [$clog2(N_CH+1)-1:0] n_dark, n_err;
  always_comb begin
    n_dark = '0;
    n_err  = '0;
    for (int i = 0; i < int'(N_CH); i++) begin
      n_dark = n_dark + darkcount[i];
      n_err  = n_err  + trig_err[i];
    end
  end

  function automatic logic [15:0] sat_add(logic [15:0] a, logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[16] ? 16'hFFFF : s[15:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status[0] <= '0;
      status[1] <= '0;
      status[2] <= '0;
    end else begin
      status[0] <= sat_add(status[0], 16'(n_dark));
      status[1] <= sat_add(status[1], 16'(n_err));
      status[2] <= sat_add(status[2], 16'(buf_full));
    end
  end

endmodule
