// sync_fifo: single-clock first-in first-out queue.
//
// A circular buffer of DEPTH entries (DEPTH a power of two) with read and
// write pointers one bit wider than the address, so full and empty are told
// apart.  The head entry is always visible on rdata while empty is low;
// asserting rd pops it at the clock edge.  wr pushes wdata; writing while
// full is ignored, as is reading while empty.  Writing and reading in the
// same cycle is allowed.  Synchronous active-low reset and clear empty it.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count = wp - rp;
  assign full  = count == (AW+1)'(DEPTH);
  assign empty = wp == rp;
  assign rdata = mem[rp[AW-1:0]];
  logic do_wr;
  assign do_wr = wr && (!full || rd);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (rd && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wp[AW-1:0]] <= wdata;

endmodule
