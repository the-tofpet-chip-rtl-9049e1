// event_formatter -- output-buffer stage that packs events into 40-bit slots.
//
// Full mode sends each event raw, as the channel stored it, in two slots:
//   {0, frame_id, ch_id[5:0], tac_id[1:0], Tcoarse, Ecoarse, SoC, Teoc, Eeoc, 20'b0}
// with every coarse value left in Gray code. Compact mode converts the Gray
// values to binary and does the subtractions on chip, fitting one slot:
//   {1, frame_id, ch_id[5:0], tac_id[1:0], Tcoarse, Teoc-SoC, Ecoarse-Tcoarse}
// i.e. the timing coarse count, the timing fine count (conversion length, 128
// clocks per clock of TAC charging) and the coarse time over threshold; the
// energy fine count is dropped. Differences are modulo 2^10.
// Handshake: an event is taken (in_ready) when the previous one has left; slots
// leave on slot_valid && slot_ready, first slot first. The mode is sampled when
// the event is taken.
// Following the chip: Full (two 5-byte slots, raw, no Gray-to-binary
// conversion) and Compact (one 5-byte slot). This design's own: both bit
// layouts and the content of Compact.
module event_formatter
  import tofpet_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              compact,
  input  logic              in_valid,
  input  buf_event_t        in,
  output logic              in_ready,
  output logic              slot_valid,
  output logic [SLOT_W-1:0] slot,
  input  logic              slot_ready
);

  logic [2*SLOT_W-1:0] pkt;
  logic [1:0]          left;
  logic [2*SLOT_W-1:0] full_pkt;
  logic [SLOT_W-1:0]   compact_slot;

  always_comb begin
    full_pkt = {1'b0, in.ev.frame_id, in.ch_id, in.ev.tac_id,
                in.ev.t_coarse, in.ev.e_coarse, in.ev.soc, in.ev.t_eoc, in.ev.e_eoc,
                20'b0};
    compact_slot = {1'b1, in.ev.frame_id, in.ch_id, in.ev.tac_id,
                    gray2bin(in.ev.t_coarse),
                    gray2bin(in.ev.t_eoc) - gray2bin(in.ev.soc),
                    gray2bin(in.ev.e_coarse) - gray2bin(in.ev.t_coarse)};
  end

  assign in_ready   = (left == 2'd0) || (left == 2'd1 && slot_ready);
  assign slot_valid = (left != 2'd0);
  assign slot       = pkt[2*SLOT_W-1 -: SLOT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt  <= '0;
      left <= '0;
    end else if (in_valid && in_ready) begin
      pkt  <= compact ? {compact_slot, {SLOT_W{1'b0}}} : full_pkt;
      left <= compact ? 2'd1 : 2'd2;
    end else if (slot_valid && slot_ready) begin
      pkt  <= {pkt[SLOT_W-1:0], {SLOT_W{1'b0}}};
      left <= left - 1'b1;
    end
  end

endmodule
