// data_buffer -- event collector between the channels and the output buffer.
//
// Every clock a round-robin arbiter picks one channel whose data register is
// full, starting after the channel served last, and moves its event, tagged
// with the channel id, into a DEPTH-entry FIFO; ev_ack clears that channel's
// register in the same clock. When the FIFO is full no channel is served: the
// channels keep their events (back-pressure, nothing is dropped) and full is
// high. The FIFO head is presented on out/out_valid and popped with out_ready.
// Following the chip: a data buffer between the 64 channels and the global
// controller. This design's own: arbitration, FIFO depth and back-pressure.
module data_buffer
  import tofpet_pkg::*;
#(
  parameter int unsigned N_CH  = N_CHANNELS,
  parameter int unsigned DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] ev_valid,
  input  ch_event_t       ev [N_CH],
  output logic [N_CH-1:0] ev_ack,
  output logic            out_valid,
  output buf_event_t      out,
  input  logic            out_ready,
  output logic            full
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(N_CH);

  buf_event_t    mem [DEPTH];
  logic [AW:0]   wr_ptr, rd_ptr;
  logic [CW-1:0] last, grant;
  logic          any;
  logic          push, pop;

  always_comb begin
    any   = 1'b0;
    grant = last;
    for (int i = 1; i <= int'(N_CH); i++) begin
      if (!any && ev_valid[CW'((int'(last) + i) % int'(N_CH))]) begin
        any   = 1'b1;
        grant = CW'((int'(last) + i) % int'(N_CH));
      end
    end
  end

  assign full      = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign out_valid = (wr_ptr != rd_ptr);
  assign push      = any && !full;
  assign pop       = out_valid && out_ready;
  assign out       = mem[rd_ptr[AW-1:0]];

  always_comb begin
    ev_ack = '0;
    if (push) ev_ack[grant] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (push) begin
      mem[wr_ptr[AW-1:0]].ch_id <= CH_ID_W'(grant);
      mem[wr_ptr[AW-1:0]].ev    <= ev[grant];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      last   <= CW'(N_CH - 1);
    end else begin
      if (push) begin
        wr_ptr <= wr_ptr + 1'b1;
        last   <= grant;
      end
      if (pop) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ev_ack));

endmodule
