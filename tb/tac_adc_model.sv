// tac_adc_model -- behavioural model (testbench only) of one TDC branch's four
// time-to-amplitude converters and their Wilkinson ADC.
//
// TAC i integrates for as long as wtac[i] is high; tac_clr[i] discards its
// charge. When conv rises the ADC starts discharging TAC conv_sel GAIN times
// more slowly than it was charged (128 on the chip), so the comparator output
// cmp rises GAIN x (write duration) after conv rises, and falls when conv falls.
// Ports follow the digital controller's TAC and ADC signals.
module tac_adc_model #(
  parameter real GAIN = 128.0
) (
  input  logic [3:0] wtac,
  input  logic [3:0] tac_clr,
  input  logic       conv,
  input  logic [1:0] conv_sel,
  output logic       cmp
);
  timeunit 1ps;
  timeprecision 1ps;
  realtime t_start [4];
  realtime dur [4];
  int      gen = 0;

  initial begin
    cmp = 1'b0;
    for (int i = 0; i < 4; i++) begin t_start[i] = 0; dur[i] = 0; end
  end

  for (genvar i = 0; i < 4; i++) begin : g_tac
    always @(posedge wtac[i]) t_start[i] = $realtime;
    always @(negedge wtac[i]) dur[i] = $realtime - t_start[i];
    always @(posedge tac_clr[i]) dur[i] = 0;
  end

  always @(posedge conv) begin
    automatic int      g = gen + 1;
    automatic realtime d = dur[conv_sel] * GAIN;
    gen = g;
    fork
      begin
        #(d);
        if (gen == g && conv) cmp = 1'b1;
      end
    join_none
  end

  always @(negedge conv) begin
    gen = gen + 1;
    cmp = 1'b0;
  end
endmodule
