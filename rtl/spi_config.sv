// spi_config -- SPI configuration slave and register file of the global controller.
//
// Holds everything the chip is configured with: one 28-bit record per channel
// (monitor select, masking, validation mode, synchroniser depth, input
// polarity, coarse gain, baseline DAC, timing and energy thresholds, energy
// shaping), the 31-bit global record (output mode and rate, training, clock
// forwarding, test pulse and calibration settings) and the 6-bit code of every
// bias cell. Reset loads the default configuration vector from tofpet_pkg, so
// the chip is testable even if the configuration link never works.
// Link: SPI mode 0, MSB first. A frame is a command byte {rd, addr[6:0]} and 32
// data bits. A write (rd=0) takes effect when cs_n rises after exactly 40 bits.
// A read (rd=1) returns the register on miso during the 32 data bits.
// Addresses: 0..63 channels, 64 global, 65..72 bias cells, 80..82 status
// counters (read only). sck, cs_n and mosi are sampled with two flip-flops in
// the master clock domain, so sck must stay below clk/6 (10 MHz against 160).
// Following the chip: SPI configuration of bias and channels, 6-bit bias DACs,
// the default vector applied by the global controller. This design's own: the
// frame format, the address map, the record layouts and the read-back.
module spi_config
  import tofpet_pkg::*;
#(
  parameter int unsigned N_CH = N_CHANNELS,
  parameter int unsigned NB   = N_BIAS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sck,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output ch_cfg_t     ch_cfg    [N_CH],
  output g_cfg_t      g_cfg,
  output logic [5:0]  bias_code [NB],
  input  logic [15:0] status    [3]
);

  localparam int unsigned FRAME_W = 40;

  logic [2:0] sck_s;
  logic [1:0] cs_s, mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s  <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], sck};
      cs_s   <= {cs_s[0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  logic sck_rise, sck_fall, cs_act;
  assign sck_rise = sck_s[1] & ~sck_s[2];
  assign sck_fall = ~sck_s[1] & sck_s[2];
  assign cs_act   = ~cs_s[1];

  logic [FRAME_W-1:0] rx;
  logic [5:0]         bits;
  logic [31:0]        tx;
  logic               cs_q;

  // Read mux.
  logic [6:0]  rd_addr;
  logic [31:0] rd_data;
  assign rd_addr = rx[6:0];
  always_comb begin
    rd_data = '0;
    if (int'(rd_addr) < int'(N_CH))                  rd_data = 32'(ch_cfg[rd_addr[5:0]]);
    else if (rd_addr == 7'd64)                       rd_data = 32'(g_cfg);
    else if (int'(rd_addr) >= 65 && int'(rd_addr) < 65 + int'(NB))
                                                     rd_data = 32'(bias_code[3'(rd_addr - 7'd65)]);
    else if (int'(rd_addr) >= 80 && int'(rd_addr) <= 82)
                                                     rd_data = 32'(status[2'(rd_addr - 7'd80)]);
  end

  logic [6:0]  wr_addr;
  logic [31:0] wr_data;
  logic        wr_en;
  assign wr_addr = rx[38:32];
  assign wr_data = rx[31:0];
  assign wr_en   = cs_q && !cs_act && (bits == 6'(FRAME_W)) && !rx[39];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx   <= '0;
      bits <= '0;
      tx   <= '0;
      miso <= 1'b0;
      cs_q <= 1'b0;
    end else begin
      cs_q <= cs_act;
      if (!cs_act) begin
        bits <= '0;
      end else if (sck_rise) begin
        rx <= {rx[FRAME_W-2:0], mosi_s[1]};
        if (bits != 6'h3F) bits <= bits + 1'b1;
      end else if (sck_fall) begin
        if (bits == 6'd8 && rx[7]) begin
          tx   <= {rd_data[30:0], 1'b0};
          miso <= rd_data[31];
        end else if (bits > 6'd8) begin
          tx   <= {tx[30:0], 1'b0};
          miso <= tx[31];
        end
      end
      if (!cs_act) miso <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_CH); i++) ch_cfg[i] <= CH_CFG_DEFAULT;
      for (int i = 0; i < int'(NB); i++)   bias_code[i] <= BIAS_DEFAULT;
      g_cfg <= G_CFG_DEFAULT;
    end else if (wr_en) begin
      if (int'(wr_addr) < int'(N_CH))  ch_cfg[wr_addr[5:0]] <= ch_cfg_t'(wr_data[$bits(ch_cfg_t)-1:0]);
      else if (wr_addr == 7'd64)        g_cfg <= g_cfg_t'(wr_data);
      else if (int'(wr_addr) >= 65 && int'(wr_addr) < 65 + int'(NB))
                                        bias_code[3'(wr_addr - 7'd65)] <= wr_data[5:0];
    end
  end

endmodule
