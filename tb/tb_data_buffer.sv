// tb_data_buffer -- checks the event collector with 8 channels and a 4-entry
// FIFO: every event comes out once, tagged with its channel, channels pending
// together are served in round-robin order, and a full FIFO holds the channels
// (back-pressure) without losing events.
module tb_data_buffer;
  import tofpet_pkg::*;
  localparam int NC = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic [NC-1:0] ev_valid = '0, ev_ack;
  ch_event_t ev [NC];
  logic out_valid, out_ready = 1'b0, full;
  buf_event_t out;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, full_seen = 0;
  int exp_ch [$];
  ch_event_t exp_ev [$];

  data_buffer #(.N_CH(NC), .DEPTH(4)) dut (.clk, .rst_n, .ev_valid, .ev, .ev_ack,
    .out_valid, .out, .out_ready, .full);

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

  // channel registers: hold the event until acknowledged
  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) if (ev_ack[c]) begin
      check(ev_valid[c], "ack only a full register");
      ev_valid[c] <= 1'b0;
      exp_ch.push_back(c);
      exp_ev.push_back(ev[c]);
    end
    if (full) full_seen++;
  end

  // output side
  always @(posedge clk) if (out_valid && out_ready) begin
    check(exp_ch.size() > 0, "no event out of nothing");
    if (exp_ch.size() > 0) begin
      check(int'(out.ch_id) == exp_ch[0] && out.ev == exp_ev[0], "event and channel id in order");
      void'(exp_ch.pop_front());
      void'(exp_ev.pop_front());
    end
    got++;
  end

  task automatic load(int c);
    ev[c] = ch_event_t'({$urandom, $urandom});
    ev_valid[c] = 1'b1;
    sent++;
  endtask

  initial begin
    int order [$];
    for (int c = 0; c < NC; c++) ev[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // round robin: all channels pending at once, served 0,1,2,... once each
    for (int c = 0; c < NC; c++) load(c);
    out_ready = 1'b1;
    for (int k = 0; k < NC; k++) begin
      @(posedge clk); #1;
    end
    check(ev_valid == '0, "all served");
    // order of service recorded by exp queues is checked on output; also check here
    // back-pressure: stall the output, load more than the FIFO holds
    repeat (4) @(posedge clk); #1;
    out_ready = 1'b0;
    for (int c = 0; c < NC; c++) load(c);
    repeat (20) @(posedge clk); #1;
    check(full, "FIFO full");
    check($countones(ev_valid) == NC - 4, "channels beyond the FIFO size are held");
    out_ready = 1'b1;
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      @(posedge clk); #1;
      out_ready = ($urandom % 3) != 0;
      for (int c = 0; c < NC; c++) if (!ev_valid[c] && ($urandom % 16) == 0) load(c);
    end
    out_ready = 1'b1;
    repeat (40) @(posedge clk); #1;
    check(got == sent, $sformatf("events out %0d of %0d", got, sent));
    check(full_seen > 0, "full condition reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // round-robin order check for the first burst: acks come 0..NC-1
  int first_burst = 0;
  always @(posedge clk) if (|ev_ack && first_burst < NC) begin
    check(ev_ack[first_burst], $sformatf("round-robin grant %0d", first_burst));
    first_burst++;
  end
endmodule
