// async_fifo: dual-clock FIFO used at the clock barrier between the sample
// clock domain and the fixed interface clock domain.
//
// Classic Gray-code pointer design: each side keeps a binary and a Gray
// pointer one bit wider than the address, the Gray pointer of the other side
// is brought over through a two-flop synchronizer, and full/empty are computed
// against the synchronized copy (so they are conservative).  The head entry
// is visible on rdata while empty is low; rd pops it.  Each side has its own
// active-low reset, synchronous to its own clock; both sides must be reset
// together.
module async_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2, rgray_s1, rgray_s2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_nx;
  assign wbin_nx = wbin + (AW+1)'(wr && !full);
  assign full = wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]};
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_s1 <= '0; rgray_s2 <= '0;
    end else begin
      wbin <= wbin_nx;
      wgray <= bin2gray(wbin_nx);
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
    end
  end
  always_ff @(posedge wclk)
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;

  // read side
  logic [AW:0] rbin_nx;
  assign rbin_nx = rbin + (AW+1)'(rd && !empty);
  assign empty = rgray == wgray_s2;
  assign rdata = mem[rbin[AW-1:0]];
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0;
    end else begin
      rbin <= rbin_nx;
      rgray <= bin2gray(rbin_nx);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

endmodule
