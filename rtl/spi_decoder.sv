// spi_decoder: SPI protocol analysis module.
//
// Inputs are four routed time-edge streams: 0 SCLK, 1 MOSI, 2 MISO, 3 SS
// (active low).  The decoder keeps the level of every line, takes the
// earliest pending packet each cycle and reacts to the edges:
//  * the sampling edge of SCLK (leading edge when CPHA = 0, trailing edge
//    when CPHA = 1; the idle level of SCLK is CPOL) shifts the current MOSI
//    and MISO levels in, least significant bit first;
//  * after word-size bits two 64-bit packets are sent: {1, time of the first
//    bit, MOSI word} and then {1, time of the last bit, MISO word};
//  * SS rising in the middle of a word sends an error packet
//    {0, time, partial MOSI word}.
// Modes (configuration register, bits as in the SPI register table):
//   [4:0] word size (0 means 32), [5] CPHA, [6] CPOL,
//   [7] three-wire type (1 = no slave select, 0 = half duplex),
//   [8] four-wire.  In half-duplex three-wire the one data line is MOSI and
//   the MISO word reads 0; with no slave select the device is always
//   selected.  Configuration is the register REG_BASE (first of the
//   module's two registers).  The error packet and the reset configuration
//   (8-bit words, mode 0, four-wire) are this design's choices.
// Output: valid/ready, one packet per cycle, through an 8-entry FIFO.
module spi_decoder
  import dla_pkg::*;
#(
  parameter logic [7:0] REG_BASE = REG_SPI_BASE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  input  logic [3:0] in_valid,
  input  time_edge_t in_data [4],
  output logic [3:0] in_ready,
  output logic       out_valid,
  output logic [63:0] out_data,
  input  logic       out_ready
);
  localparam int SCLK = 0, MOSI = 1, MISO = 2, SS = 3;

  logic [8:0] cfg_r;
  always_ff @(posedge clk) begin
    if (!rst_n) cfg_r <= 9'h108;          // four-wire, mode 0, 8 bits
    else if (cfg.valid && cfg.regnum == REG_BASE) cfg_r <= cfg.data[8:0];
  end
  logic [5:0] wsize;
  logic cpha, cpol, no_ss, four;
  assign wsize = (cfg_r[4:0] == 5'd0) ? 6'd32 : {1'b0, cfg_r[4:0]};
  assign cpha = cfg_r[5];
  assign cpol = cfg_r[6];
  assign no_ss = cfg_r[7];
  assign four = cfg_r[8];

  // output FIFO
  logic f_wr, f_full, f_empty;
  logic [63:0] f_d;
  logic [3:0] f_count;
  sync_fifo #(.WIDTH(64), .DEPTH(8)) u_out (
    .clk, .rst_n, .clr(1'b0), .wr(f_wr), .wdata(f_d), .rd(out_ready && !f_empty),
    .rdata(out_data), .full(f_full), .empty(f_empty), .count(f_count));
  assign out_valid = !f_empty;

  logic pend2;
  logic [63:0] pkt2;
  logic take, sel_valid;
  logic [2:0] sel_idx;
  time_edge_t pkt;
  assign take = !pend2 && f_count <= 4'd5;
  earliest_select #(.N(4)) u_sel (
    .in_valid, .in_data, .in_ready, .take, .sel_valid, .sel_idx, .sel_data(pkt));

  logic [3:0] lvl;
  logic [5:0] nbits;
  logic [31:0] mosi_sr, miso_sr;
  stime_t t_first;
  logic ss_used, selected;
  assign ss_used  = four || !no_ss;
  assign selected = !ss_used || !lvl[SS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lvl <= 4'b1000;
      nbits <= '0;
      mosi_sr <= '0; miso_sr <= '0;
      t_first <= '0;
      pend2 <= 1'b0; pkt2 <= '0;
      f_wr <= 1'b0; f_d <= '0;
    end else begin
      f_wr <= 1'b0;
      if (pend2) begin
        f_wr <= 1'b1; f_d <= pkt2; pend2 <= 1'b0;
      end else if (take && sel_valid) begin
        lvl[sel_idx[1:0]] <= pkt.level;
        if (pkt.level != lvl[sel_idx[1:0]]) begin
          if (int'(sel_idx) == SCLK && selected && pkt.level == !(cpol ^ cpha)) begin
            mosi_sr[nbits[4:0]] <= lvl[MOSI];
            miso_sr[nbits[4:0]] <= four ? lvl[MISO] : 1'b0;
            if (nbits == 6'd0) t_first <= pkt.time_;
            if (nbits + 6'd1 == wsize) begin
              nbits <= '0;
              f_wr <= 1'b1;
              f_d  <= {1'b1, (nbits == 6'd0) ? pkt.time_ : t_first,
                       mosi_sr | (32'(lvl[MOSI]) << nbits[4:0])};
              pend2 <= 1'b1;
              pkt2  <= {1'b1, pkt.time_,
                        miso_sr | (32'(four & lvl[MISO]) << nbits[4:0])};
              mosi_sr <= '0; miso_sr <= '0;
            end else begin
              nbits <= nbits + 6'd1;
            end
          end else if (int'(sel_idx) == SS && ss_used) begin
            if (pkt.level && nbits != 6'd0) begin
              f_wr <= 1'b1;
              f_d  <= {1'b0, pkt.time_, mosi_sr};
            end
            nbits <= '0;
            mosi_sr <= '0; miso_sr <= '0;
          end
        end
      end
    end
  end
endmodule
