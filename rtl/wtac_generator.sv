// wtac_generator -- TAC write controller of one TDC branch.
//
// The TAC write (wtac) starts asynchronously with the latched trigger
// (disc_out) and is ended by stopramp on a master clock edge, so the charge on
// the TAC measures the time from the trigger to that edge. The state machine
// follows the chip's wtacgenerator: IDLE waits for the synchronised trigger
// DOxL_syn; CHECK goes to STOP, or through HOLD for one more clock when the
// trigger fell in the high half of the clock (hcc=1), so the ramp always lasts
// long enough to be linear; STOP raises stopramp; PRESET clears the trigger
// latch and waits until the latch is seen clear, the TAC to be written next is
// free (fired_tac=0) and writing is enabled (wtac_en=1) before re-arming.
// Timing: with the trigger latched and DOxL_syn high in cycle n, the state is
// CHECK in cycle n+1 and stopramp rises at the edge ending cycle n+1 (hcc=0) or
// n+2 (hcc=1). stop_pulse is high for the one cycle spent in STOP.
// Following the chip: the five states and all transitions printed for them, and
// wtac as the latched trigger gated by stopramp. This design's own: holding
// stopramp from STOP until PRESET is left, clearing the latch during PRESET
// up to the cycle that returns to IDLE, leaving STOP for PRESET
// unconditionally, and starting in PRESET after reset (the latch's buffers reset
// to ones, so the first PRESET clears the latch before the branch is armed).
module wtac_generator (
  input  logic clk,
  input  logic rst_n,
  input  logic doxl_syn,
  input  logic hcc,
  input  logic disc_out,
  input  logic fired_tac,
  input  logic wtac_en,
  output logic wtac,
  output logic wtacn,
  output logic stopramp,
  output logic latch_clr,
  output logic stop_pulse,
  output logic armed
);

  typedef enum logic [2:0] {IDLE, CHECK, HOLD, STOP, PRESET} state_e;

  state_e state, next;

  always_comb begin
    next = state;
    unique case (state)
      IDLE:    if (doxl_syn) next = CHECK;
      CHECK:   next = hcc ? HOLD : STOP;
      HOLD:    next = STOP;
      STOP:    next = PRESET;
      PRESET:  if (!(doxl_syn || fired_tac || !wtac_en)) next = IDLE;
      default: next = PRESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= PRESET;
      stopramp <= 1'b1;
    end else begin
      state    <= next;
      stopramp <= (next == STOP) || (next == PRESET);
    end
  end

  assign wtac       = disc_out & ~stopramp;
  assign wtacn      = ~wtac;
  // The latch clear goes through the master-clock reset_bar flip-flop, so it
  // is dropped in the last PRESET cycle: the latch is armed at the same edge
  // that enters IDLE and no trigger is lost in between.
  assign latch_clr  = (state == PRESET) && (next == PRESET);
  assign stop_pulse = (state == STOP);
  assign armed      = (state == IDLE);

endmodule
