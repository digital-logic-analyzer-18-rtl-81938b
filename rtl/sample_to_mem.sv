// sample_to_mem: the sampler-to-memory interconnect.
//
// Takes the memory copy of all 32 sampling channels, each with a small
// input buffer, and merges them into one 64-bit valid/ready stream for the
// sampler's memory channel.  Every cycle the buffered sample with the
// earliest time is sent (lowest channel number on a tie), which is fair to
// all channels and writes the samples to memory in time order.  Output
// word: {27'b0, channel number[4:0], time-edge packet[31:0]}.
// The buffer depth is this design's choice.
module sample_to_mem
  import dla_pkg::*;
#(
  parameter int NCH   = 32,
  parameter int DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] in_valid,
  input  time_edge_t     in_data [NCH],
  output logic [NCH-1:0] in_ready,
  output logic           out_valid,
  output logic [63:0]    out_data,
  input  logic           out_ready
);
  logic [NCH-1:0] empty, full, rd;
  time_edge_t q [NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_buf
    sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n, .clr(1'b0), .wr(in_valid[c] && in_ready[c]), .wdata(in_data[c]),
      .rd(rd[c]), .rdata(q[c]), .full(full[c]), .empty(empty[c]), .count());
  end
  assign in_ready = ~full;

  logic [4:0] sel;
  always_comb begin
    out_valid = 1'b0;
    sel = '0;
    for (int c = 0; c < NCH; c++) begin
      if (!empty[c] && (!out_valid || q[c].time_ < q[sel].time_)) begin
        out_valid = 1'b1;
        sel = 5'(c);
      end
    end
    out_data = {27'd0, sel, q[sel]};
    rd = '0;
    rd[sel] = out_valid && out_ready;
  end
endmodule
