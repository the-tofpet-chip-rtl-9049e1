// tb_test_pulse_gen -- checks the internal test pulse (high for len clocks from
// coarse count pos, also across the frame wrap), the enable, and the external
// pulse selection, which must pass the external edge without a clock.
module tb_test_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic [9:0] coarse_bin = '0, pos;
  logic [5:0] len;
  logic int_en = 1'b0, ext_sel = 1'b0, ext_tp = 1'b0, tp;
  int checks = 0, failures = 0;

  test_pulse_gen dut (.clk, .rst_n, .coarse_bin, .int_en, .ext_sel, .pos, .len, .ext_tp, .tp);

  always #50 clk = ~clk;
  always @(posedge clk) coarse_bin <= coarse_bin + 1'b1;

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

  // Run two frames and compare tp with the expected window, one clock late.
  task automatic frames(input int p, input int l, input bit en);
    int high = 0;
    int prev;
    pos = 10'(p); len = 6'(l); int_en = en;
    @(posedge clk); @(posedge clk); #1;
    repeat (2048) begin
      prev = (int'(coarse_bin) + 1023) % 1024;   // count seen at the last edge
      check(tp == (en && ((prev - p + 1024) % 1024) < l),
            $sformatf("pos %0d len %0d count %0d tp %0d", p, l, prev, tp));
      high += tp;
      @(posedge clk); #1;
    end
    check(high == (en ? 2 * l : 0), $sformatf("pulse clocks %0d", high));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    frames(100, 4, 1'b1);
    frames(1020, 9, 1'b1);
    frames(5, 63, 1'b1);
    frames(100, 4, 1'b0);
    ext_sel = 1'b1;
    @(negedge clk); #7 ext_tp = 1'b1; #1;
    check(tp == 1'b1, "external pulse passes unclocked");
    #5 ext_tp = 1'b0; #1;
    check(tp == 1'b0, "external pulse falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
