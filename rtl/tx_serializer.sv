// tx_serializer -- serial data output of the global controller.
//
// Sends 40-bit slots on the data link at 1, 2 or 4 bits per master clock
// (rate 0, 1, 2), which at 160 MHz is 160, 320 or 640 Mb/s; the pad stage
// shifts tx_bits out bit 3 first (the lanes below the rate are 0). The line
// idles at 0; each slot is a start bit 1 followed by the slot, MSB first,
// padded with idle bits to a whole clock, so a slot takes 41, 21 or 11 clocks.
// A new slot is taken in the clock the previous one ends, so slots can follow
// back to back. While training is set and no slot is in flight, the line
// carries 1010... for the receiver to find its bit phase; no slot is taken.
// clk_out_gate registers the clock-forwarding enable for the pad.
// Following the chip: 160-640 Mb/s output, training or forwarded clock. This
// design's own: the line format and the parallel interface to the pad.
module tx_serializer
  import tofpet_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        rate,
  input  logic              training,
  input  logic              clk_out_en,
  input  logic              slot_valid,
  input  logic [SLOT_W-1:0] slot,
  output logic              slot_ready,
  output logic [3:0]        tx_bits,
  output logic              clk_out_gate
);

  localparam int unsigned PKT_W = SLOT_W + 4;   // start bit + slot + pad

  logic [PKT_W-1:0] sh;
  logic [5:0]       cycles;      // clocks left in the current slot
  logic [5:0]       slot_cycles;
  logic             phase;
  logic [1:0]       r;

  assign r = (rate == 2'd3) ? 2'd2 : rate;

  always_comb begin
    unique case (r)
      2'd0:    slot_cycles = 6'd41;
      2'd1:    slot_cycles = 6'd21;
      default: slot_cycles = 6'd11;
    endcase
  end

  assign slot_ready = slot_valid && (cycles <= 6'd1) && !(training && cycles == 6'd0);

  always_comb begin
    tx_bits = '0;
    if (cycles != 6'd0) begin
      unique case (r)
        2'd0:    tx_bits = {sh[PKT_W-1], 3'b000};
        2'd1:    tx_bits = {sh[PKT_W-1 -: 2], 2'b00};
        default: tx_bits = sh[PKT_W-1 -: 4];
      endcase
    end else if (training) begin
      unique case (r)
        2'd0:    tx_bits = {phase, 3'b000};
        2'd1:    tx_bits = 4'b1000;
        default: tx_bits = 4'b1010;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh           <= '0;
      cycles       <= '0;
      phase        <= 1'b1;
      clk_out_gate <= 1'b0;
    end else begin
      clk_out_gate <= clk_out_en;
      phase        <= ~phase;
      if (slot_ready) begin
        sh     <= {1'b1, slot, 3'b000};
        cycles <= slot_cycles;
      end else if (cycles != 6'd0) begin
        unique case (r)
          2'd0:    sh <= {sh[PKT_W-2:0], 1'b0};
          2'd1:    sh <= {sh[PKT_W-3:0], 2'b00};
          default: sh <= {sh[PKT_W-5:0], 4'b0000};
        endcase
        cycles <= cycles - 1'b1;
      end
    end
  end

endmodule
