// tb_coarse_counter -- checks the coarse time base: binary count, its Gray copy
// (one bit changes per clock), frame id toggling at each wrap, and the
// synchronous restart. Expected values come from a reference count kept here.
module tb_coarse_counter;
  logic clk = 1'b0, rst_n = 1'b1, sync_rst = 1'b0;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic [9:0] gray, bin, prev_gray;
  logic frame_id;
  int checks = 0, failures = 0;
  int ref_cnt, ref_frame;

  coarse_counter #(.W(10)) dut (.clk, .rst_n, .sync_rst, .gray, .bin, .frame_id);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    ref_cnt = 0; ref_frame = 0;
    prev_gray = 0;
    for (int i = 0; i < 2500; i++) begin
      @(posedge clk); #1;
      ref_cnt = (ref_cnt + 1) % 1024;
      if (ref_cnt == 0) ref_frame ^= 1;
      check(bin == 10'(ref_cnt), $sformatf("bin %0d expected %0d", bin, ref_cnt));
      check(gray == (10'(ref_cnt) ^ (10'(ref_cnt) >> 1)), "gray code");
      check($countones(gray ^ prev_gray) == 1, "one Gray bit per clock");
      check(frame_id == 1'(ref_frame), "frame id");
      prev_gray = gray;
    end
    sync_rst = 1'b1;
    @(posedge clk); #1;
    sync_rst = 1'b0;
    check(bin == 0 && gray == 0 && frame_id == 0, "sync restart");
    @(posedge clk); #1;
    check(bin == 1 && gray == 1, "count after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
