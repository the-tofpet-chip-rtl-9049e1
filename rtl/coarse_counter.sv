// coarse_counter -- master clock time stamp counter of the global controller.
//
// A free-running W-bit binary counter (10 bits on the chip) advances on every
// master clock edge. Its Gray-coded copy is what the channels latch as Tcoarse,
// Ecoarse, SoC and EoC: Gray code changes one bit per clock, so a value taken
// near a count change is off by at most one. Both copies are registered.
// frame_id toggles each time the count wraps, so a frame is 2^W clocks.
// sync_rst restarts the count at zero on the next edge.
// Following the chip: the 10-bit master clock count and the Gray coding of the
// raw coarse values. This design's own: the frame as one counter wrap and the
// synchronous restart.
module coarse_counter #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sync_rst,
  output logic [W-1:0] gray,
  output logic [W-1:0] bin,
  output logic         frame_id
);

  logic [W-1:0] next_bin;

  always_comb next_bin = sync_rst ? '0 : bin + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin      <= '0;
      gray     <= '0;
      frame_id <= 1'b0;
    end else begin
      bin  <= next_bin;
      gray <= next_bin ^ (next_bin >> 1);
      if (sync_rst)        frame_id <= 1'b0;
      else if (&bin)       frame_id <= ~frame_id;
    end
  end

endmodule
