// tb_sync_validation -- checks SYNC-mode hit validation: DOE seen with DOT or one
// clock later is a valid hit, DOT alone is a false hit, the verdict is held
// until both triggers are low, and DOE alone is also accepted.
module tb_sync_validation;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic dotl_syn = 1'b0, doel_syn = 1'b0;
  logic validhit, falsehit;
  int checks = 0, failures = 0;

  sync_validation dut (.clk, .rst_n, .dotl_syn, .doel_syn, .validhit, .falsehit);

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

  // DOT at clock 0, DOE `lag` clocks later (lag < 0: no DOE); returns the verdict.
  task automatic event_(input int lag, output bit v, output bit f);
    dotl_syn = 1'b1;
    if (lag == 0) doel_syn = 1'b1;
    for (int k = 1; k <= 4; k++) begin
      tick();
      if (lag == k) doel_syn = 1'b1;
    end
    v = validhit; f = falsehit;
    check(!(validhit && falsehit), "exclusive verdicts");
    repeat (3) begin tick(); check(validhit == v && falsehit == f, "verdict held while triggers high"); end
    dotl_syn = 1'b0;
    tick();
    if (lag >= 0) check(validhit == v && falsehit == f, "held while DOE still high");
    doel_syn = 1'b0;
    tick(); tick();
    check(!validhit && !falsehit, "back to waiting");
  endtask

  initial begin
    bit v, f;
    repeat (2) tick();
    rst_n = 1'b1;
    check(!validhit && !falsehit, "idle after reset");
    event_(0, v, f);  check(v && !f, "DOE with DOT: valid");
    event_(1, v, f);  check(v && !f, "DOE one clock after DOT: valid");
    event_(2, v, f);  check(!v && f, "DOE two clocks after DOT: false hit");
    event_(-1, v, f); check(!v && f, "DOT alone: false hit");
    doel_syn = 1'b1; tick(); tick();
    check(validhit, "DOE alone: valid");
    doel_syn = 1'b0; tick(); tick();
    check(!validhit, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
