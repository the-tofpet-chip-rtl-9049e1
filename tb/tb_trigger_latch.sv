// tb_trigger_latch -- checks the asynchronous trigger latch: disc_out rises at
// the discriminator edge itself (between clock edges), the half-clock flag
// records the clock level at that instant, latched_syn follows after 0..3
// clocks as set by depth, further edges are ignored until a clear, and the
// falling-edge variant triggers on the falling edge only.
module tb_trigger_latch;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic disc = 1'b0, clr = 1'b0, discf = 1'b1;
  logic [1:0] depth;
  logic disc_out, hcc, latched_syn;
  logic f_out, f_hcc, f_syn;
  int checks = 0, failures = 0;

  trigger_latch #(.FALLING(1'b0)) dut  (.clk, .rst_n, .disc, .clr, .depth, .disc_out, .hcc, .latched_syn);
  trigger_latch #(.FALLING(1'b1)) dutf (.clk, .rst_n, .disc(discf), .clr, .depth, .disc_out(f_out), .hcc(f_hcc), .latched_syn(f_syn));

  always #50 clk = ~clk;   // period 100

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rearm();
    clr = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    check(disc_out == 1'b0 && f_out == 1'b0, "cleared");
    clr = 1'b0;
    disc = 1'b0;
    discf = 1'b1;
    @(posedge clk); @(posedge clk); @(posedge clk); @(posedge clk); #1;
  endtask

  initial begin
    depth = 2'd1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    for (int d = 0; d < 4; d++) begin
      for (int h = 0; h < 2; h++) begin
        depth = 2'(d);
        // edge 10 units after a rising clock edge (clk high) or after a falling one (clk low)
        @(posedge clk);
        if (h == 0) @(negedge clk);
        #10;
        check(disc_out == 1'b0, "not yet latched");
        disc = 1'b1;
        discf = 1'b0;
        #1;
        check(disc_out == 1'b1, "latched at the edge, before any clock");
        check(f_out == 1'b1, "falling-edge latch fires on the falling edge");
        check(hcc == 1'(h), $sformatf("hcc=%0d expected %0d", hcc, h));
        if (d == 0) check(latched_syn == 1'b1, "depth 0 passes through");
        else begin
          check(latched_syn == 1'b0, "not yet synchronised");
          // latched_syn must appear exactly d clock edges later
          for (int k = 1; k <= d; k++) begin
            @(posedge clk); #1;
            check(latched_syn == (k == d), $sformatf("depth %0d: after %0d edges syn=%0d", d, k, latched_syn));
          end
        end
        // a second edge while latched changes nothing
        disc = 1'b0; #3; disc = 1'b1; #1;
        check(disc_out == 1'b1 && hcc == 1'(h), "second edge ignored");
        rearm();
        check(latched_syn == 1'b0 && f_syn == 1'b0, "synchronised copy cleared");
      end
    end
    // falling-edge variant ignores a rising edge
    clr = 1'b1; discf = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    clr = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    discf = 1'b1; #1;
    check(f_out == 1'b0, "rising edge ignored by falling-edge latch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
