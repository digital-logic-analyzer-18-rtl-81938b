// dla_top: the digital logic analyzer.
//
// 32 probe inputs are sampled on a configurable sample clock, triggered by
// a pattern/edge trigger or by hand, and turned into time-edge packets.
// The packets cross into the fixed interface clock domain, where they are
// routed to the protocol analysis modules (4 I2C, 4 SPI, 4 UART, 1 XMEM)
// and copied to memory.  The sample stream and the output of every analysis
// module go through 14 memory channels into circular buffers in system
// memory, written with AXI bursts through 8 AXI masters.  The CPU
// configures everything through memory-mapped registers on the
// general-purpose AXI port, which the CPU interface broadcasts on the
// configuration bus; it reads back the tail pointers and the interrupt
// status.
// Ports: clk/rst_n the interface clock and reset; sclk and mmcm_* connect
// the external clock manager that makes the sample clock; s_* the AXI
// slave on the CPU's general-purpose port; axi_req/axi_rsp the eight AXI3
// write masters that the AXI crossbar joins onto the coherent memory port;
// irq the interrupt; button1 a push button (interrupt bit 15); sample_lost
// a sticky flag (sample clock domain) set when a post-trigger buffer of a
// sampling channel overflowed.  The functional-input numbering is given in
// dla_pkg.
module dla_top
  import dla_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // sample clock manager
  input  logic        sclk,
  input  logic        mmcm_locked,
  output logic [6:0]  mmcm_mult,
  output logic [6:0]  mmcm_div,
  output logic        mmcm_reconfig,
  // probes
  input  logic [NUM_CHANNELS-1:0] probe,
  input  logic        button1,
  // CPU general-purpose port (AXI slave)
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic        irq,
  // AXI write masters towards the crossbar / coherent port
  output axi_wr_req_t axi_req [NUM_AXI],
  input  axi_wr_rsp_t axi_rsp [NUM_AXI],
  output logic        sample_lost
);
  cfg_bus_t cfg;
  logic [31:0] tail [NUM_MEM_CH];
  logic [31:0] isr;

  cpu_interface u_cpu (
    .clk, .rst_n, .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wvalid,
    .s_wready, .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid,
    .s_arready, .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .cfg, .tail, .isr, .irq);

  // ---------------- sample clock and sampler ----------------
  logic srst_n, clk_stable;
  sample_clock_ctrl u_sclk (
    .clk, .rst_n, .cfg, .mmcm_mult, .mmcm_div, .mmcm_reconfig, .mmcm_locked,
    .sclk, .srst_n, .clk_stable);

  logic [NUM_CHANNELS-1:0] s_valid, s_ready;
  time_edge_t s_data [NUM_CHANNELS];
  sampler u_sampler (
    .clk, .rst_n, .cfg, .sclk, .srst_n, .probe,
    .out_valid(s_valid), .out_data(s_data), .out_ready(s_ready),
    .running(), .triggered(), .edge_lost(sample_lost));

  // ---------------- sampler interface ----------------
  logic [NUM_FUNC_IN-1:0] fi_valid, fi_ready;
  time_edge_t fi_data [NUM_FUNC_IN];
  logic [NUM_CHANNELS-1:0] tap_valid, tap_ready;
  time_edge_t tap_data [NUM_CHANNELS];
  logic overflow;
  sampler_interface u_si (
    .sclk, .srst_n, .ch_valid(s_valid), .ch_data(s_data), .ch_ready(s_ready),
    .clk, .rst_n, .cfg, .fi_valid, .fi_data, .fi_ready,
    .mem_valid(tap_valid), .mem_data(tap_data), .mem_ready(tap_ready),
    .overflow);

  // ---------------- memory channel inputs ----------------
  logic [NUM_MEM_CH-1:0] m_valid, m_ready;
  logic [63:0] m_data [NUM_MEM_CH];

  sample_to_mem u_s2m (
    .clk, .rst_n, .in_valid(tap_valid), .in_data(tap_data), .in_ready(tap_ready),
    .out_valid(m_valid[0]), .out_data(m_data[0]), .out_ready(m_ready[0]));

  // ---------------- analysis modules ----------------
  for (genvar k = 0; k < 4; k++) begin : g_i2c
    i2c_decoder #(.REG_BASE(REG_I2C_BASE + 8'(2 * k))) u_i2c (
      .clk, .rst_n, .cfg,
      .in_valid(fi_valid[FI_I2C + 2*k +: 2]),
      .in_data(fi_data[FI_I2C + 2*k : FI_I2C + 2*k + 1]),
      .in_ready(fi_ready[FI_I2C + 2*k +: 2]),
      .out_valid(m_valid[1 + k]), .out_data(m_data[1 + k]), .out_ready(m_ready[1 + k]));
  end
  for (genvar k = 0; k < 4; k++) begin : g_spi
    spi_decoder #(.REG_BASE(REG_SPI_BASE + 8'(2 * k))) u_spi (
      .clk, .rst_n, .cfg,
      .in_valid(fi_valid[FI_SPI + 4*k +: 4]),
      .in_data(fi_data[FI_SPI + 4*k : FI_SPI + 4*k + 3]),
      .in_ready(fi_ready[FI_SPI + 4*k +: 4]),
      .out_valid(m_valid[5 + k]), .out_data(m_data[5 + k]), .out_ready(m_ready[5 + k]));
  end
  for (genvar k = 0; k < 4; k++) begin : g_uart
    uart_decoder #(.REG_BASE(REG_UART_BASE + 8'(2 * k))) u_uart (
      .clk, .rst_n, .cfg,
      .in_valid(fi_valid[FI_UART + k]), .in_data(fi_data[FI_UART + k]),
      .in_ready(fi_ready[FI_UART + k]),
      .out_valid(m_valid[9 + k]), .out_data(m_data[9 + k]), .out_ready(m_ready[9 + k]));
  end
  xmem_decoder u_xmem (
    .clk, .rst_n,
    .in_valid(fi_valid[FI_XMEM +: 19]),
    .in_data(fi_data[FI_XMEM : FI_XMEM + 18]),
    .in_ready(fi_ready[FI_XMEM +: 19]),
    .out_valid(m_valid[13]), .out_data(m_data[13]), .out_ready(m_ready[13]));

  // ---------------- button ----------------
  logic b1, b2, b3;
  always_ff @(posedge clk) begin
    if (!rst_n) begin b1 <= 1'b0; b2 <= 1'b0; b3 <= 1'b0; end
    else begin b1 <= button1; b2 <= b1; b3 <= b2; end
  end

  // ---------------- memory system ----------------
  mem_system u_mem (
    .clk, .rst_n, .cfg, .in_valid(m_valid), .in_data(m_data), .in_ready(m_ready),
    .axi_req, .axi_rsp, .tail, .ev_overflow(overflow), .ev_button(b2 && !b3),
    .ev_clk_stable(clk_stable), .isr);
endmodule
