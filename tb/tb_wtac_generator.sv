// tb_wtac_generator -- checks the TAC write controller cycle by cycle: wtac
// rises with the latched trigger, stopramp ends it 2 clocks after the
// synchronised trigger is seen (3 with hcc=1), stop_pulse lasts one clock, the
// latch is cleared in PRESET, and PRESET is held while DOxL_syn is high, the
// next TAC is occupied or writing is disabled.
module tb_wtac_generator;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic doxl_syn = 1'b0, hcc = 1'b0, disc_out = 1'b0, fired_tac = 1'b0, wtac_en = 1'b1;
  logic wtac, wtacn, stopramp, latch_clr, stop_pulse, armed;
  int checks = 0, failures = 0;

  wtac_generator dut (.clk, .rst_n, .doxl_syn, .hcc, .disc_out, .fired_tac, .wtac_en,
                      .wtac, .wtacn, .stopramp, .latch_clr, .stop_pulse, .armed);

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One trigger: returns the number of clock edges from the first edge that
  // sees doxl_syn until wtac falls.
  task automatic one_event(input bit h, output int wlen);
    check(armed && !stopramp, "armed before the trigger");
    #20 disc_out = 1'b1; hcc = h;
    #1 check(wtac && !wtacn, "wtac rises with the latch, no clock needed");
    tick();
    doxl_syn = 1'b1;               // synchroniser output one clock later
    wlen = 0;
    while (wtac && wlen < 10) begin
      tick();
      wlen++;
      if (wtac) check(!stop_pulse, "no stop while writing");
    end
    check(stop_pulse && stopramp, "stop_pulse with stopramp at the end of the write");
    tick();
    check(!stop_pulse && latch_clr, "PRESET clears the latch");
    disc_out = 1'b0;
    tick();
    check(latch_clr && !armed, "PRESET held while DOxL_syn is high");
    doxl_syn = 1'b0;
  endtask

  initial begin
    int wlen;
    repeat (2) tick();
    rst_n = 1'b1;
    check(stopramp && !armed && !latch_clr, "reset into PRESET, leaving at once: latch clear already dropped");
    tick();
    check(armed && !latch_clr && !stopramp, "PRESET to IDLE after reset");
    for (int h = 0; h < 2; h++) begin
      one_event(1'(h), wlen);
      check(wlen == 2 + h, $sformatf("write length %0d clocks, hcc=%0d", wlen, h));
      tick();
      check(armed && !stopramp, "back to IDLE");
    end
    // occupied TAC and disabled writing both hold PRESET
    fired_tac = 1'b1;
    one_event(1'b0, wlen);
    repeat (5) begin tick(); check(latch_clr && !armed, "PRESET held while fired_tac"); end
    fired_tac = 1'b0;
    wtac_en = 1'b0;
    repeat (5) begin tick(); check(latch_clr && !armed, "PRESET held while wtac_en is low"); end
    wtac_en = 1'b1;
    tick();
    check(armed, "IDLE once free and enabled");
    // a latched trigger while in PRESET does not write the TAC
    fired_tac = 1'b1;
    one_event(1'b0, wlen);
    #20 disc_out = 1'b1; #1;
    check(!wtac, "stopramp masks a trigger during PRESET");
    disc_out = 1'b0;
    fired_tac = 1'b0;
    tick(); tick();
    check(armed, "IDLE again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
