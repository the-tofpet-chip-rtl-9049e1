// trigger_latch -- capture of an asynchronous discriminator edge.
//
// A flip-flop clocked by the discriminator edge (rising, or falling when
// FALLING=1) with its data input tied high sets disc_out the instant the
// trigger arrives; this is what starts a TAC write, so the time measurement does
// not wait for the master clock. At the same edge hcc records the level of the
// master clock, telling in which half of the clock period the trigger fell.
// The latch is cleared through a flip-flop clocked by the master clock (the
// reset_bar flip-flop): clr requested in cycle n holds the latch cleared from
// edge n+1 until one edge after clr falls. latched_syn (DOxL_syn) is disc_out
// passed through `depth` synchronising flip-flops (0 to 3); depth 0 hands the
// latch to the controller directly, at the risk of metastability.
// Reset: the only asynchronous clear of the latch is rst_n AND NOT reset_bar.
// reset_bar resets to 0 and the buffers to all ones, so after reset the
// controller sees a trigger and requests a clear, and the latch is cleared by a
// real edge of that clear whatever state it powered up in.
// Following the chip: the edge flip-flop with D tied high, the clocked clear,
// the 0-3 buffer chain and the half-clock flag. This design's own: taking the
// half-clock flag as the master clock level sampled by the trigger edge, and
// the reset values.
module trigger_latch #(
  parameter bit          FALLING   = 1'b0,
  parameter int unsigned MAX_DEPTH = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       disc,
  input  logic       clr,
  input  logic [1:0] depth,
  output logic       disc_out,
  output logic       hcc,
  output logic       latched_syn
);

  logic                 trig_edge;
  logic                 clr_q;
  logic                 arm_n;
  logic [MAX_DEPTH-1:0] sync_q;

  assign trig_edge = disc ^ FALLING;

  // reset_bar flip-flop: the clear is applied on master clock edges only. It
  // resets to 0 and the synchronising buffers reset to 1, so after reset the
  // controller sees a trigger, requests a clear, and the latch is cleared by a
  // real falling edge of arm_n whatever its power-up state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clr_q <= 1'b0;
    else        clr_q <= clr;
  end

  assign arm_n = rst_n & ~clr_q;

  // nrst flip-flop: D tied to '1', clocked by the discriminator.
  always_ff @(posedge trig_edge or negedge arm_n) begin
    if (!arm_n) begin
      disc_out <= 1'b0;
      hcc      <= 1'b0;
    end else begin
      disc_out <= 1'b1;
      if (!disc_out) hcc <= clk;
    end
  end

  // Synchronising buffers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '1;
    else        sync_q <= {sync_q[MAX_DEPTH-2:0], disc_out};
  end

  always_comb begin
    if (depth == 2'd0)                      latched_syn = disc_out;
    else if (int'(depth) > int'(MAX_DEPTH)) latched_syn = sync_q[MAX_DEPTH-1];
    else                                    latched_syn = sync_q[depth-1];
  end

endmodule
