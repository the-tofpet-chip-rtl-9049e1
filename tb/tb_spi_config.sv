// tb_spi_config -- checks the configuration slave through its SPI pins with a
// 10 MHz-like link (16 master clocks per bit): the power-on default vector,
// writes to channel, global and bias registers seen on the outputs, read-back
// of those and of the status inputs, and that a frame of the wrong length is
// ignored.
module tb_spi_config;
  import tofpet_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic sck = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  ch_cfg_t ch_cfg [N_CHANNELS];
  g_cfg_t g_cfg;
  logic [5:0] bias_code [N_BIAS];
  logic [15:0] status [3];
  int checks = 0, failures = 0;

  spi_config dut (.clk, .rst_n, .sck, .cs_n, .mosi, .miso, .ch_cfg, .g_cfg, .bias_code, .status);

  always #50 clk = ~clk;     // 100 per clock, SPI bit = 1600

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mode 0 master: nbits of {cmd, data} out, miso sampled on rising sck.
  task automatic xfer(input logic [39:0] frame, input int nbits, output logic [31:0] rd);
    rd = '0;
    cs_n = 1'b0;
    #800;
    for (int i = 0; i < nbits; i++) begin
      mosi = frame[39 - i];
      #800 sck = 1'b1;
      if (i >= 8) rd = {rd[30:0], miso};
      #800 sck = 1'b0;
    end
    #800 cs_n = 1'b1;
    #1600;
  endtask

  task automatic wr(input int addr, input logic [31:0] d);
    logic [31:0] dummy;
    xfer({1'b0, 7'(addr), d}, 40, dummy);
  endtask

  task automatic rd(input int addr, output logic [31:0] d);
    xfer({1'b1, 7'(addr), 32'h0}, 40, d);
  endtask

  initial begin
    logic [31:0] d, v;
    logic [31:0] chv [N_CHANNELS];
    status[0] = 16'h1234; status[1] = 16'h00FF; status[2] = 16'hBEEF;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    // defaults
    for (int c = 0; c < N_CHANNELS; c++)
      check(ch_cfg[c] == CH_CFG_DEFAULT, "channel default");
    check(ch_cfg[0].val_mode == VAL_PRAEDICTIO && ch_cfg[0].sync_depth == 2'd1 &&
          ch_cfg[0].p_type == 1'b0 && ch_cfg[0].shaping_en, "default vector contents");
    check(g_cfg == G_CFG_DEFAULT, "global default");
    for (int b = 0; b < N_BIAS; b++) check(bias_code[b] == BIAS_DEFAULT, "bias default");
    rd(5, d);
    check(d == 32'(CH_CFG_DEFAULT), $sformatf("read default channel %h", d));
    // write a few channels, global and bias
    for (int k = 0; k < 6; k++) begin
      int c = (k * 23) % N_CHANNELS;
      v = 32'($urandom) & ((32'd1 << $bits(ch_cfg_t)) - 1);
      chv[c] = v;
      wr(c, v);
      check(32'(ch_cfg[c]) == v, $sformatf("channel %0d written", c));
      rd(c, d);
      check(d == v, $sformatf("channel %0d read back %h expected %h", c, d, v));
    end
    v = 32'($urandom) & ((32'd1 << $bits(g_cfg_t)) - 1);
    wr(64, v);
    check(32'(g_cfg) == v, "global written");
    rd(64, d);
    check(d == v, "global read back");
    for (int b = 0; b < N_BIAS; b++) begin
      wr(65 + b, 32'(b * 7 + 1));
      check(bias_code[b] == 6'(b * 7 + 1), "bias written");
    end
    rd(67, d);
    check(d == 32'(2 * 7 + 1), "bias read back");
    for (int s = 0; s < 3; s++) begin
      rd(80 + s, d);
      check(d == 32'(status[s]), $sformatf("status %0d read %h", s, d));
    end
    // a short frame is ignored
    v = 32'(ch_cfg[10]);
    xfer({1'b0, 7'd10, 32'h3FFFFFF}, 39, d);
    check(32'(ch_cfg[10]) == v, "short frame ignored");
    // reset restores the default vector
    rst_n = 1'b0;
    #200 rst_n = 1'b1;
    check(ch_cfg[0] == CH_CFG_DEFAULT && g_cfg == G_CFG_DEFAULT, "reset restores defaults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
