// uart_decoder: UART protocol analysis module.
//
// One routed time-edge input, the receive line.  The line idles high; a
// frame is a low start bit, 5 to 8 data bits sent least significant bit
// first, an optional even-parity bit and one or two high stop bits.
// Because only edges arrive, the decoder keeps the line level and works out
// each bit from the bit period: after a falling edge from idle at time t0
// it samples the line at t0 + period/2 + k*period, for the start bit, the
// data bits, the parity bit and the stop bits.  A sample point is resolved
// once a packet with a later time is pending (the level up to that packet
// is then known), one sample point per cycle.  A frame whose last bits are
// constant is therefore reported when the next edge arrives.
// Configuration register REG_BASE, bits as in the UART register table:
//   [15:0] bit period in sample-clock ticks, [16] parity enable,
//   [17] two stop bits, [20:18] data bits minus one (4..7 for 5..8 bits).
// Output packets, 64 bits: [63] 1 = frame good, [62:32] start-bit time,
// [9] parity error, [8] stop-bit (framing) error, [7:0] data.
// The evaluation of sample points from the bit period, even parity, the
// "minus one" encoding and the packet layout are this design's choices.
module uart_decoder
  import dla_pkg::*;
#(
  parameter logic [7:0] REG_BASE = REG_UART_BASE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  input  logic       in_valid,
  input  time_edge_t in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [63:0] out_data,
  input  logic       out_ready
);
  logic [20:0] cfg_r;
  always_ff @(posedge clk) begin
    if (!rst_n) cfg_r <= {3'd7, 1'b0, 1'b0, 16'd16};   // 8N1, 16 ticks per bit
    else if (cfg.valid && cfg.regnum == REG_BASE) cfg_r <= cfg.data[20:0];
  end
  logic [15:0] period;
  logic par_en, two_stop;
  logic [3:0] nbits;
  assign period   = cfg_r[15:0];
  assign par_en   = cfg_r[16];
  assign two_stop = cfg_r[17];
  assign nbits    = {1'b0, cfg_r[20:18]} + 4'd1;

  // total bit slots: start + data + parity + stop(s)
  logic [3:0] nslots;
  assign nslots = 4'd1 + nbits + 4'(par_en) + (two_stop ? 4'd2 : 4'd1);

  logic f_wr, f_empty;
  logic [63:0] f_d;
  logic [3:0] f_cnt;
  sync_fifo #(.WIDTH(64), .DEPTH(8)) u_out (.clk, .rst_n, .clr(1'b0), .wr(f_wr),
    .wdata(f_d), .rd(out_ready && !f_empty), .rdata(out_data), .full(),
    .empty(f_empty), .count(f_cnt));
  assign out_valid = !f_empty;

  logic level, in_frame, par_err, stop_err;
  stime_t t0, next_pt;
  logic [3:0] slot;
  logic [7:0] data;
  logic par;
  logic sample_now;
  // a sample point is resolved when a later edge is pending
  assign sample_now = in_frame && in_valid && next_pt < in_data.time_;
  assign in_ready   = in_valid && !sample_now && f_cnt < 4'd7;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level <= 1'b1; in_frame <= 1'b0;
      t0 <= '0; next_pt <= '0; slot <= '0; data <= '0; par <= 1'b0;
      par_err <= 1'b0; stop_err <= 1'b0;
      f_wr <= 1'b0; f_d <= '0;
    end else begin
      f_wr <= 1'b0;
      if (sample_now) begin
        next_pt <= next_pt + stime_t'(period);
        slot <= slot + 4'd1;
        if (slot == 4'd0) begin
          if (level) in_frame <= 1'b0;          // glitch, not a start bit
        end else if (slot <= nbits) begin
          data[3'(slot - 4'd1)] <= level;
          par <= par ^ level;
        end else if (par_en && slot == nbits + 4'd1) begin
          if (level != par) par_err <= 1'b1;
        end else begin
          if (!level) stop_err <= 1'b1;
          if (slot == nslots - 4'd1) begin
            in_frame <= 1'b0;
            f_wr <= 1'b1;
            f_d  <= {!(par_err || stop_err || !level), t0,
                     22'd0, par_err, stop_err || !level, data};
          end
        end
      end else if (in_ready) begin
        level <= in_data.level;
        if (!in_frame && level && !in_data.level) begin
          in_frame <= 1'b1;
          t0 <= in_data.time_;
          next_pt <= in_data.time_ + (stime_t'(period) >> 1);
          slot <= '0; data <= '0; par <= 1'b0;
          par_err <= 1'b0; stop_err <= 1'b0;
        end
      end
    end
  end
endmodule
