// sampler_interface: routes samples from the sampling channels to the
// functional (protocol analysis) inputs and to memory.
//
// Every sampling channel feeds an asynchronous FIFO, the clock barrier
// between the sample clock (3-100 MHz) and the fixed interface clock.  On
// the interface side two register banks set the routing:
//   "input channel for signal n" (47 registers, offsets 0..46): which
//       sampling channel feeds functional input n;
//   "destination signal for channel c" (32 registers, offsets 47..78): which
//       functional input takes channel c's samples; FI_NONE (reset value) or
//       any value >= 47 means none.
// A functional input sees a valid sample only when both registers agree, so
// each channel has at most one functional reader, and the ready of that
// reader is routed back to pop the channel's FIFO.  The memory path watches
// every FIFO output: a sample popped by a functional reader is copied to
// memory in the same cycle, and a channel with no functional reader is
// popped by the memory path itself.  When a functional reader pops a sample
// while the memory path is not ready, the memory copy is lost and overflow
// pulses (the "sampler to memory overflow" interrupt).  The interface side
// of the FIFOs is held in reset while the sample domain is in reset.  All handshakes are
// valid/ready.  The FIFO depth and the lossy memory copy are this design's
// choices; the routing structure follows the design.
module sampler_interface
  import dla_pkg::*;
#(
  parameter int NCH        = 32,
  parameter int NFI        = 47,
  parameter int FIFO_DEPTH = 16
) (
  input  logic           sclk,
  input  logic           srst_n,
  input  logic [NCH-1:0] ch_valid,
  input  time_edge_t     ch_data [NCH],
  output logic [NCH-1:0] ch_ready,
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_bus_t       cfg,
  output logic [NFI-1:0] fi_valid,
  output time_edge_t     fi_data [NFI],
  input  logic [NFI-1:0] fi_ready,
  output logic [NCH-1:0] mem_valid,
  output time_edge_t     mem_data [NCH],
  input  logic [NCH-1:0] mem_ready,
  output logic           overflow
);
  logic [NCH-1:0] empty, full, pop;
  // the read side of the FIFOs is reset together with the sample domain
  logic rd_rst_n;
  rst_sync u_rrst (.clk, .arst_n(rst_n && srst_n), .rst_n(rd_rst_n));
  time_edge_t q [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_fifo
    async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wclk(sclk), .wrst_n(srst_n), .wr(ch_valid[c]), .wdata(ch_data[c]),
      .full(full[c]),
      .rclk(clk), .rrst_n(rd_rst_n), .rd(pop[c]), .rdata(q[c]), .empty(empty[c]));
  end
  assign ch_ready = ~full;

  // routing registers
  logic [4:0] insel [NFI];
  logic [6:0] dest  [NCH];
  logic [7:0] roff;
  assign roff = cfg.regnum - REG_SI_BASE;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NFI; n++) insel[n] <= '0;
      for (int c = 0; c < NCH; c++) dest[c] <= 7'(FI_NONE);
    end else if (cfg.valid && cfg.regnum >= REG_SI_BASE) begin
      if (int'(roff) < SIREG_INSEL + NFI) insel[roff[5:0]] <= cfg.data[4:0];
      else if (int'(roff) < SIREG_DEST + NCH) dest[5'(roff - 8'(SIREG_DEST))] <= cfg.data[6:0];
    end
  end

  // functional side
  always_comb begin
    for (int n = 0; n < NFI; n++) begin
      fi_data[n]  = q[insel[n]];
      fi_valid[n] = !empty[insel[n]] && int'(dest[insel[n]]) == n;
    end
  end

  // pop and memory copy
  logic [NCH-1:0] has_reader, lost;
  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      has_reader[c] = int'(dest[c]) < NFI && int'(insel[dest[c]]) == c;
      pop[c] = !empty[c] && (has_reader[c] ? fi_ready[dest[c]] : mem_ready[c]);
      lost[c] = pop[c] && has_reader[c] && !mem_ready[c];
      mem_valid[c] = pop[c] && mem_ready[c];
      mem_data[c] = q[c];
    end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) overflow <= 1'b0;
    else overflow <= lost != '0;
  end
endmodule
