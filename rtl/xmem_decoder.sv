// xmem_decoder: AVR external-memory (XMEM) bus analysis module.
//
// 19 routed time-edge inputs: 0-7 the multiplexed data/low-address lines
// AD[7:0], 8-15 the high address byte A[15:8], 16 RD_n, 17 WR_n, 18 ALE.
// The decoder rebuilds the current state of all these lines from the
// earliest pending packet each cycle.  While ALE is high the low address
// byte follows the data lines (the external latch).  A falling edge on RD_n
// or WR_n produces an information packet with the 16-bit address and the
// data lines at that moment.  Protocol violations produce an error packet
// instead:
//   err_rdwr          RD_n and WR_n both low;
//   err_ale           ALE high while RD_n or WR_n is low;
//   err_addr_changed  A[15:8] changes while RD_n or WR_n is low;
//   err_data_changed  AD[7:0] changes while WR_n is low.
// Packet, 64 bits: [63] 1 = information, 0 = error; [62:32] sample time;
// [31:28] {err_rdwr, err_ale, err_addr_changed, err_data_changed};
// [24] write; [23:8] address; [7:0] data.  The signal set and the four
// error flags follow the design; the packet layout, the meaning given to
// err_addr_changed and the line numbering are this design's choices.
// Output: valid/ready through an 8-entry FIFO.
module xmem_decoder
  import dla_pkg::*;
#(
  parameter int NIN = 19
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NIN-1:0] in_valid,
  input  time_edge_t     in_data [NIN],
  output logic [NIN-1:0] in_ready,
  output logic           out_valid,
  output logic [63:0]    out_data,
  input  logic           out_ready
);
  localparam int RD = 16, WR = 17, ALE = 18;

  logic f_wr, f_empty;
  logic [63:0] f_d;
  logic [3:0] f_cnt;
  sync_fifo #(.WIDTH(64), .DEPTH(8)) u_out (.clk, .rst_n, .clr(1'b0), .wr(f_wr),
    .wdata(f_d), .rd(out_ready && !f_empty), .rdata(out_data), .full(),
    .empty(f_empty), .count(f_cnt));
  assign out_valid = !f_empty;

  logic take, sel_valid;
  logic [4:0] sel_idx;
  time_edge_t pkt;
  assign take = f_cnt < 4'd7;
  earliest_select #(.N(NIN)) u_sel (.in_valid, .in_data, .in_ready, .take,
    .sel_valid, .sel_idx, .sel_data(pkt));

  logic [NIN-1:0] lvl, nl;
  logic [7:0] addr_lo;
  logic changed, rd_fall, wr_fall;
  logic [3:0] err;
  always_comb begin
    nl = lvl;
    nl[sel_idx] = pkt.level;
    changed = sel_valid && nl != lvl;
    rd_fall = changed && int'(sel_idx) == RD && !nl[RD];
    wr_fall = changed && int'(sel_idx) == WR && !nl[WR];
    err[3] = changed && (int'(sel_idx) == RD || int'(sel_idx) == WR) && !nl[RD] && !nl[WR];
    err[2] = changed && nl[ALE] && (!nl[RD] || !nl[WR]) &&
             (int'(sel_idx) == ALE || int'(sel_idx) == RD || int'(sel_idx) == WR);
    err[1] = changed && sel_idx >= 5'd8 && sel_idx < 5'd16 && (!nl[RD] || !nl[WR]);
    err[0] = changed && sel_idx < 5'd8 && !nl[WR];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lvl <= '0;
      lvl[RD] <= 1'b1;
      lvl[WR] <= 1'b1;
      addr_lo <= '0;
      f_wr <= 1'b0; f_d <= '0;
    end else begin
      f_wr <= 1'b0;
      if (take && sel_valid) begin
        lvl <= nl;
        if (nl[ALE]) addr_lo <= nl[7:0];
        if (err != '0) begin
          f_wr <= 1'b1;
          f_d  <= {1'b0, pkt.time_, err, 3'd0, !nl[WR], nl[15:8],
                   nl[ALE] ? nl[7:0] : addr_lo, nl[7:0]};
        end else if (rd_fall || wr_fall) begin
          f_wr <= 1'b1;
          f_d  <= {1'b1, pkt.time_, 4'd0, 3'd0, wr_fall, nl[15:8], addr_lo, nl[7:0]};
        end
      end
    end
  end
endmodule
