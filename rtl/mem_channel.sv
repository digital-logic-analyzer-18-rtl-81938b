// mem_channel: one memory channel of the memory interface.
//
// Accepts 64-bit words on a valid/ready input without looking at their
// meaning, collects them in an internal buffer of 16 words (one full AXI3
// burst of 16 beats x 8 bytes = 128 bytes) and writes them with BurstIf
// transactions into a circular buffer in system memory.  The channel owns
// the buffer addresses: registers (4 per channel, from REG_BASE):
//   +0 buffer base address (write)      +2 head pointer offset (write)
//   +1 buffer length in bytes (write)   +3 tail pointer offset (read, tail)
// All are byte values, multiples of 8.  The tail is where the next word
// goes, the head is where the reader (the driver) will read next; the
// buffer is full when the tail is 8 bytes behind the head.  Whenever no
// transaction is outstanding and words are buffered, a burst is started of
// as many words as are buffered, limited by 16, the free space, the end of
// the circular buffer and the next 4 KB boundary (AXI bursts may not cross
// it).  When done returns, the tail advances (wrapping at the buffer end)
// and write_done pulses.  Writing the length register clears the tail.
// Burst collection, 16-beat bursts and the head/tail registers follow the
// design; the moment a burst is started, the tail clear and the 4 KB rule
// are this design's choices.
module mem_channel
  import dla_pkg::*;
#(
  parameter logic [7:0] REG_BASE  = 8'd0,
  parameter int         BUF_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_bus_t    cfg,
  input  logic        in_valid,
  input  logic [63:0] in_data,
  output logic        in_ready,
  burst_if.master     bus,
  output logic [31:0] tail,
  output logic        write_done
);
  logic [31:0] base, len, head;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base <= '0; len <= '0; head <= '0;
    end else if (cfg.valid) begin
      if (cfg.regnum == REG_BASE)        base <= {cfg.data[31:3], 3'b0};
      if (cfg.regnum == REG_BASE + 8'd1) len  <= {cfg.data[31:3], 3'b0};
      if (cfg.regnum == REG_BASE + 8'd2) head <= {cfg.data[31:3], 3'b0};
    end
  end

  logic f_full, f_empty, f_rd;
  logic [$clog2(BUF_DEPTH):0] f_cnt;
  sync_fifo #(.WIDTH(64), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .clr(1'b0), .wr(in_valid && in_ready), .wdata(in_data), .rd(f_rd),
    .rdata(bus.wdata), .full(f_full), .empty(f_empty), .count(f_cnt));
  assign in_ready = !f_full;

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_DATA, M_RESP} mstate_t;
  mstate_t state;
  logic [4:0] beats, sent;
  logic [31:0] addr;

  // words that may be written now
  logic [31:0] free_b, to_end_b, to_4k_b, lim_b, cand;
  always_comb begin
    free_b   = (head > tail) ? head - tail - 32'd8 : len - tail + head - 32'd8;
    to_end_b = len - tail;
    addr     = base + tail;
    to_4k_b  = 32'd4096 - {20'd0, addr[11:0]};
    lim_b    = free_b;
    if (to_end_b < lim_b) lim_b = to_end_b;
    if (to_4k_b  < lim_b) lim_b = to_4k_b;
    cand = 32'(f_cnt);
    if (cand > 32'd16) cand = 32'd16;
    if ((lim_b >> 3) < cand) cand = lim_b >> 3;
  end

  assign bus.req_valid = state == M_REQ;
  assign bus.req_addr  = base + tail;
  assign bus.req_len   = 4'(beats - 5'd1);
  assign bus.wvalid    = state == M_DATA && !f_empty;
  assign bus.wlast     = sent + 5'd1 == beats;
  assign f_rd          = bus.wvalid && bus.wready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= M_IDLE; beats <= '0; sent <= '0; tail <= '0; write_done <= 1'b0;
    end else begin
      write_done <= 1'b0;
      case (state)
        M_IDLE: if (len != 0 && cand != 0) begin
          beats <= 5'(cand);
          state <= M_REQ;
        end
        M_REQ: if (bus.req_ready) begin
          sent <= '0;
          state <= M_DATA;
        end
        M_DATA: if (f_rd) begin
          sent <= sent + 5'd1;
          if (bus.wlast) state <= M_RESP;
        end
        default: if (bus.done) begin
          tail <= (tail + {24'd0, beats, 3'b0} >= len) ? '0 : tail + {24'd0, beats, 3'b0};
          write_done <= 1'b1;
          state <= M_IDLE;
        end
      endcase
      if (cfg.valid && cfg.regnum == REG_BASE + 8'd1) tail <= '0;
    end
  end

  a_burst_fits: assert property (@(posedge clk) disable iff (!rst_n)
    bus.req_valid |-> beats >= 5'd1 && beats <= 5'd16);
endmodule
