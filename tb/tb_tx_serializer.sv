// tb_tx_serializer -- checks the serial output: a receiver written here decodes
// the line (idle 0, start bit, 40 bits MSB first) at 1, 2 and 4 bits per clock;
// every slot must arrive intact and in order, back-to-back slots must take 41,
// 21 and 11 clocks, and training must send 1010... without taking slots.
module tb_tx_serializer;
  import tofpet_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  // reset is applied as a falling edge, so asynchronous clears act on every
  // flip-flop whatever its power-up value
  initial #1 rst_n = 1'b0;
  logic [1:0] rate = 2'd0;
  logic training = 1'b0, clk_out_en = 1'b1, slot_valid = 1'b0, slot_ready, clk_out_gate;
  logic [SLOT_W-1:0] slot;
  logic [3:0] tx_bits;
  int checks = 0, failures = 0;
  logic [SLOT_W-1:0] sent_q [$];
  int rx_bits = -1;           // -1: waiting for a start bit
  logic [SLOT_W-1:0] rx_sh;
  int received = 0;
  int take_cycle [$];

  tx_serializer dut (.clk, .rst_n, .rate, .training, .clk_out_en, .slot_valid, .slot, .slot_ready, .tx_bits, .clk_out_gate);

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

  int cyc = 0;
  always @(posedge clk) begin
    int nb;
    cyc++;
    if (slot_valid && slot_ready) begin
      sent_q.push_back(slot);
      take_cycle.push_back(cyc);
    end
    if (rst_n && !training) begin
      nb = (rate == 0) ? 1 : (rate == 1) ? 2 : 4;
      for (int i = 3; i > 3 - nb; i--) begin
        if (rx_bits < 0) begin
          if (tx_bits[i]) rx_bits = 0;
        end else begin
          rx_sh = {rx_sh[SLOT_W-2:0], tx_bits[i]};
          rx_bits++;
          if (rx_bits == SLOT_W) begin
            check(sent_q.size() > 0 && rx_sh == sent_q[0], "slot received intact");
            if (sent_q.size() > 0) void'(sent_q.pop_front());
            received++;
            rx_bits = -1;
          end
        end
      end
      for (int i = 3 - nb; i >= 0; i--) check(!tx_bits[i], "unused lanes low");
    end
  end

  task automatic burst(input int r, input int n);
    int first;
    rate = 2'(r);
    take_cycle.delete();
    for (int k = 0; k < n; k++) begin
      slot_valid = 1'b1;
      slot = {$urandom, 8'($urandom)};
      @(posedge clk);
      while (!slot_ready) @(posedge clk);
      #1;
    end
    slot_valid = 1'b0;
    repeat (60) @(posedge clk); #1;
    check(sent_q.size() == 0, "burst fully received");
    first = (r == 0) ? 41 : (r == 1) ? 21 : 11;
    for (int k = 1; k < take_cycle.size(); k++)
      check(take_cycle[k] - take_cycle[k-1] == first,
            $sformatf("rate %0d: %0d clocks per slot", r, take_cycle[k] - take_cycle[k-1]));
  endtask

  initial begin
    int ones;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 3; r++) burst(r, 20);
    check(received == 60, $sformatf("received %0d slots", received));
    // training
    training = 1'b1;
    slot_valid = 1'b1;
    slot = '1;
    for (int r = 0; r < 3; r++) begin
      rate = 2'(r);
      ones = 0;
      repeat (16) begin
        @(posedge clk); #1;
        check(!slot_ready, "no slot taken while training");
        if (r == 0) ones += tx_bits[3];
        else if (r == 1) check(tx_bits == 4'b1000, "training pattern 10");
        else check(tx_bits == 4'b1010, "training pattern 1010");
      end
      if (r == 0) check(ones == 8, "training alternates at 1 bit per clock");
    end
    check(clk_out_gate, "clock forwarding enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
