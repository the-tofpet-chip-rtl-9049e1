// tb_event_formatter -- checks slot packing in both output modes against
// layouts rebuilt here field by field, with its own Gray-to-binary decoder,
// under random back-pressure on the slot side.
module tb_event_formatter;
  import tofpet_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic compact = 1'b0, in_valid = 1'b0, in_ready, slot_valid, slot_ready = 1'b0;
  buf_event_t in;
  logic [SLOT_W-1:0] slot;
  int checks = 0, failures = 0;
  logic [SLOT_W-1:0] exp_q [$];
  int n_full = 0, n_compact = 0;

  event_formatter dut (.clk, .rst_n, .compact, .in_valid, .in, .in_ready, .slot_valid, .slot, .slot_ready);

  always #50 clk = ~clk;

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

  function automatic int g2b(logic [9:0] g);
    int b = 0;
    logic acc = 1'b0;
    for (int i = 9; i >= 0; i--) begin
      acc ^= g[i];
      b |= int'(acc) << i;
    end
    return b;
  endfunction

  function automatic logic [9:0] rand_gray();
    logic [9:0] b = 10'($urandom);
    return b ^ (b >> 1);
  endfunction

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      if (compact) begin
        exp_q.push_back({1'b1, in.ev.frame_id, in.ch_id, in.ev.tac_id,
                         10'(g2b(in.ev.t_coarse)),
                         10'(g2b(in.ev.t_eoc) - g2b(in.ev.soc)),
                         10'(g2b(in.ev.e_coarse) - g2b(in.ev.t_coarse))});
        n_compact++;
      end else begin
        exp_q.push_back({1'b0, in.ev.frame_id, in.ch_id, in.ev.tac_id,
                         in.ev.t_coarse, in.ev.e_coarse, in.ev.soc});
        exp_q.push_back({in.ev.t_eoc, in.ev.e_eoc, 20'b0});
        n_full++;
      end
    end
    if (slot_valid && slot_ready) begin
      check(exp_q.size() > 0, "slot expected");
      if (exp_q.size() > 0) begin
        check(slot == exp_q[0], $sformatf("slot %h expected %h", slot, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 2) == 0;
        in.ch_id = 6'($urandom);
        in.ev.tac_id = 2'($urandom);
        in.ev.frame_id = 1'($urandom);
        in.ev.t_coarse = rand_gray();
        in.ev.e_coarse = rand_gray();
        in.ev.soc = rand_gray();
        in.ev.t_eoc = rand_gray();
        in.ev.e_eoc = rand_gray();
        compact = (k / 500) % 2 == 1;
      end
      slot_ready = ($urandom % 4) != 0;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    slot_ready = 1'b1;
    repeat (10) @(posedge clk); #1;
    check(exp_q.size() == 0, "all slots out");
    check(n_full > 100 && n_compact > 100, "both modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
