// test_pulse_gen -- test pulse source of the global controller.
//
// The test pulse exercises the channels and the TDCs: it drives the calibration
// charge injector, or, in TDC test mode, the discriminator inputs directly.
// The internal pulse is high for `len` clocks starting at coarse count `pos`,
// once per frame, registered (it rises one clock after the count equals pos).
// With ext_sel the external pulse is used instead, unregistered, so its phase
// against the master clock is kept; this is what a phase scan of the TDC needs.
// Following the chip: internal (global controller) or external test pulse,
// positioned in the frame. This design's own: the position/length registers.
module test_pulse_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] coarse_bin,
  input  logic       int_en,
  input  logic       ext_sel,
  input  logic [9:0] pos,
  input  logic [5:0] len,
  input  logic       ext_tp,
  output logic       tp
);

  logic       tp_int;
  logic [9:0] offset;

  assign offset = coarse_bin - pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tp_int <= 1'b0;
    else        tp_int <= int_en && (offset < {4'd0, len});
  end

  assign tp = ext_sel ? ext_tp : tp_int;

endmodule
