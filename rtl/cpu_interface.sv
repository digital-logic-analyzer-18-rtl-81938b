// cpu_interface: CpuInterface, the CPU's window onto the analyzer.
//
// An AXI slave on the processor's general-purpose port (single-beat
// accesses, 32-bit data).  Every write is broadcast for one cycle on the
// global configuration bus as {valid, register number, data}, the register
// number being byte address bits [9:2]; every module watches the bus for
// its own registers.  The bus carries no reads: the only readable registers
// are answered here directly, the tail pointer of each memory channel
// (register 4k+3) and the interrupt status register (register 56); all
// other addresses read 0.  irq is high while any status bit is set.
// Write address and write data may arrive in any order; the response
// follows the broadcast by one cycle.  Burst accesses are not supported
// (this design's simplification; the driver issues single 32-bit accesses).
module cpu_interface
  import dla_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI slave, write
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  // AXI slave, read
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // analyzer side
  output cfg_bus_t    cfg,
  input  logic [31:0] tail [NUM_MEM_CH],
  input  logic [31:0] isr,
  output logic        irq
);
  logic have_aw, have_w;
  logic [7:0] wreg;
  logic [31:0] wdat;

  assign s_awready = !have_aw && !s_bvalid;
  assign s_wready  = !have_w && !s_bvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;
  assign irq = isr != '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_aw <= 1'b0; have_w <= 1'b0; wreg <= '0; wdat <= '0;
      s_bvalid <= 1'b0; cfg <= '0;
      s_rvalid <= 1'b0; s_rdata <= '0;
    end else begin
      cfg.valid <= 1'b0;
      if (s_awvalid && s_awready) begin have_aw <= 1'b1; wreg <= s_awaddr[9:2]; end
      if (s_wvalid && s_wready)   begin have_w  <= 1'b1; wdat <= s_wdata; end
      if (have_aw && have_w) begin
        cfg <= '{valid: 1'b1, regnum: wreg, data: wdat};
        have_aw <= 1'b0; have_w <= 1'b0;
        s_bvalid <= 1'b1;
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;

      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        if (s_araddr[9:2] == REG_MEM_ISR) s_rdata <= isr;
        else if (s_araddr[9:2] < REG_MEM_ISR && s_araddr[3:2] == 2'd3)
          s_rdata <= tail[s_araddr[7:4]];
        else s_rdata <= '0;
      end else if (s_rvalid && s_rready) s_rvalid <= 1'b0;
    end
  end
endmodule
