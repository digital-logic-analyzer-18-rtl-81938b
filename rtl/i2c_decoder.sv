// i2c_decoder: I2C protocol analysis module.
//
// Inputs are two routed time-edge streams, 0 SCL and 1 SDA.  The decoder
// keeps its own model of both lines, always takes the older of the two
// pending packets, and drives a state machine with the edges it sees:
//   RESET -> START -> SLAVE_ADDR -> RW -> ACK_NAK -> DATA -> STOP -> START
// SDA falling while SCL is high is a start condition, SDA rising while SCL
// is high a stop condition.  SDA is sampled on each SCL rising edge and the
// bit is taken when SCL falls again, so the SCL pulse that carries a stop
// or repeated start condition is not counted as a bit.
// Seven address bits (MSB first), the R/W bit and the acknowledge bit form
// an address packet; in DATA every data-width bits plus an acknowledge bit
// form a data packet.  A start or stop in the middle of a byte produces an
// error packet.  A start seen in DATA (repeated start) restarts the address
// phase.
// Output packets, 64 bits: [63:61] type (1 start, 2 stop, 3 address, 4 data,
// 7 error), [60:30] sample time, [25] acknowledge, [24] R/W, [23:0] address
// or data.  Address/data/error packets go to one FIFO and start/stop
// packets to another, so two packets made in one cycle never meet in a
// FIFO; the two FIFOs are merged onto one valid/ready output, older first.
// Configuration register REG_BASE bits [4:0]: data width (0 means 8,
// limited to 24).  Packet layout and the limits are this design's choices.
module i2c_decoder
  import dla_pkg::*;
#(
  parameter logic [7:0] REG_BASE = REG_I2C_BASE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  input  logic [1:0] in_valid,
  input  time_edge_t in_data [2],
  output logic [1:0] in_ready,
  output logic       out_valid,
  output logic [63:0] out_data,
  input  logic       out_ready
);
  typedef enum logic [2:0] {I_RESET, I_START, I_ADDR, I_RW, I_ACK, I_DATA, I_STOP} istate_t;
  localparam logic [2:0] T_START = 3'd1, T_STOP = 3'd2, T_ADDR = 3'd3,
                         T_DATA = 3'd4, T_ERR = 3'd7;

  logic [4:0] width_r;
  logic [4:0] width;
  always_ff @(posedge clk) begin
    if (!rst_n) width_r <= 5'd8;
    else if (cfg.valid && cfg.regnum == REG_BASE) width_r <= cfg.data[4:0];
  end
  assign width = (width_r == 5'd0) ? 5'd8 : (width_r > 5'd24) ? 5'd24 : width_r;

  // two output FIFOs merged older-first
  logic a_wr, b_wr, a_empty, b_empty, a_rd, b_rd;
  logic [3:0] a_cnt, b_cnt;
  logic [63:0] a_d, b_d, a_q, b_q;
  sync_fifo #(.WIDTH(64), .DEPTH(8)) u_fa (.clk, .rst_n, .clr(1'b0), .wr(a_wr),
    .wdata(a_d), .rd(a_rd), .rdata(a_q), .full(), .empty(a_empty), .count(a_cnt));
  sync_fifo #(.WIDTH(64), .DEPTH(8)) u_fb (.clk, .rst_n, .clr(1'b0), .wr(b_wr),
    .wdata(b_d), .rd(b_rd), .rdata(b_q), .full(), .empty(b_empty), .count(b_cnt));
  logic use_a;
  assign use_a = !a_empty && (b_empty || a_q[60:30] <= b_q[60:30]);
  assign out_valid = !a_empty || !b_empty;
  assign out_data  = use_a ? a_q : b_q;
  assign a_rd = out_ready && use_a;
  assign b_rd = out_ready && !use_a && !b_empty;

  logic take, sel_valid;
  logic [1:0] sel_idx;
  time_edge_t pkt;
  assign take = a_cnt < 4'd7 && b_cnt < 4'd7;
  earliest_select #(.N(2)) u_sel (.in_valid, .in_data, .in_ready, .take,
    .sel_valid, .sel_idx, .sel_data(pkt));

  istate_t state;
  logic scl, sda, rw;
  logic bit_pend, bit_val;
  stime_t t_rise;
  logic [4:0] nbits;
  logic [23:0] sr;
  stime_t t0;

  function automatic logic [63:0] mk(logic [2:0] ty, stime_t t, logic ack,
                                      logic r, logic [23:0] d);
    return {ty, t, 4'd0, ack, r, d};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= I_RESET;
      scl <= 1'b1; sda <= 1'b1; rw <= 1'b0;
      bit_pend <= 1'b0; bit_val <= 1'b0; t_rise <= '0;
      nbits <= '0; sr <= '0; t0 <= '0;
      a_wr <= 1'b0; b_wr <= 1'b0; a_d <= '0; b_d <= '0;
    end else begin
      a_wr <= 1'b0; b_wr <= 1'b0;
      if (take && sel_valid) begin
        if (sel_idx == 2'd0) scl <= pkt.level; else sda <= pkt.level;
        if (sel_idx == 2'd1 && pkt.level != sda && scl) begin
          // start (SDA falls) or stop (SDA rises) with SCL high
          b_wr <= 1'b1;
          b_d  <= mk(pkt.level ? T_STOP : T_START, pkt.time_, 1'b0, 1'b0, 24'd0);
          if (state inside {I_ADDR, I_RW, I_ACK} || (state == I_DATA && nbits != 0)) begin
            a_wr <= 1'b1;
            a_d  <= mk(T_ERR, pkt.time_, 1'b0, rw, sr);
          end
          nbits <= '0; sr <= '0;
          bit_pend <= 1'b0;
          state <= pkt.level ? I_STOP : I_START;
        end else if (sel_idx == 2'd0 && pkt.level && !scl) begin
          // SCL rising edge: sample SDA
          bit_pend <= 1'b1; bit_val <= sda; t_rise <= pkt.time_;
        end else if (sel_idx == 2'd0 && !pkt.level && scl && bit_pend) begin
          // SCL falling edge: take the bit
          bit_pend <= 1'b0;
          case (state)
            I_START: begin
              state <= I_ADDR; sr <= {23'd0, bit_val}; nbits <= 5'd1; t0 <= t_rise;
            end
            I_ADDR: begin
              sr <= {sr[22:0], bit_val};
              nbits <= nbits + 5'd1;
              if (nbits == 5'd6) state <= I_RW;
            end
            I_RW: begin rw <= bit_val; state <= I_ACK; end
            I_ACK: begin
              a_wr <= 1'b1;
              a_d  <= mk(T_ADDR, t0, !bit_val, rw, sr);
              sr <= '0; nbits <= '0;
              state <= I_DATA;
            end
            I_DATA: begin
              if (nbits == width) begin
                a_wr <= 1'b1;
                a_d  <= mk(T_DATA, t0, !bit_val, rw, sr);
                sr <= '0; nbits <= '0;
              end else begin
                if (nbits == 5'd0) t0 <= t_rise;
                sr <= {sr[22:0], bit_val};
                nbits <= nbits + 5'd1;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
