// sync_validation -- SYNC-mode hit validation of one channel.
//
// The latched and synchronised time trigger (DOTL_syn) and energy trigger
// (DOEL_syn) are polled every clock. An energy trigger seen with, or one clock
// after, the time trigger makes a valid hit; a time trigger not followed by an
// energy trigger within that clock is a false hit (a dark count). The machine
// stays in IS_VALID_HIT or IS_FALSE_HIT, driving validhit or falsehit, until
// both triggers have been cleared, then waits for the next event.
// Following the chip: the four states and the transitions printed for
// sync_validation. This design's own: the return from IS_VALID_HIT to
// WAIT_FOR_EVENT once both triggers are low, mirroring IS_FALSE_HIT.
module sync_validation (
  input  logic clk,
  input  logic rst_n,
  input  logic dotl_syn,
  input  logic doel_syn,
  output logic validhit,
  output logic falsehit
);

  typedef enum logic [1:0] {WAIT_FOR_EVENT, SAW_DOT, IS_VALID_HIT, IS_FALSE_HIT} state_e;

  state_e state, next;

  always_comb begin
    next = state;
    unique case (state)
      WAIT_FOR_EVENT: if (doel_syn)      next = IS_VALID_HIT;
                      else if (dotl_syn) next = SAW_DOT;
      SAW_DOT:        next = doel_syn ? IS_VALID_HIT : IS_FALSE_HIT;
      IS_VALID_HIT:   if (!dotl_syn && !doel_syn) next = WAIT_FOR_EVENT;
      IS_FALSE_HIT:   if (!dotl_syn && !doel_syn) next = WAIT_FOR_EVENT;
      default:        next = WAIT_FOR_EVENT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= WAIT_FOR_EVENT;
    else        state <= next;
  end

  assign validhit = (state == IS_VALID_HIT);
  assign falsehit = (state == IS_FALSE_HIT);

endmodule
