// mem_system: MemSystem, the memory interface of the analyzer.
//
// Fourteen memory channels, one per data source, each writing a circular
// buffer in system memory (channel 0 the sampler, 1-4 I2C 0-3, 5-8 SPI 0-3,
// 9-12 UART 0-3, 13 XMEM, following the memory-interface register groups).
// The channels' BurstIf buses reach eight AXI masters: the sampler and
// I2C 0 have one each, the other twelve share six BurstSwitches in pairs
// (XMEM/UART 3, UART 2/UART 1, UART 0/SPI 3, SPI 2/SPI 1, SPI 0/I2C 3,
// I2C 2/I2C 1).  The eight AXI write masters go to the crossbar in front of
// the coherent (ACP) port, with IDs 0..7 (sampler 0, I2C 0 1, switches
// 2..7).  This block also holds the interrupt status register (register
// 56): bit 0 sampler-to-memory overflow, bit 14 memory write done, bit 15
// button 1 pressed, bit 16 sample clock stable; each bit is set by its
// event and cleared by writing 1 to it on the configuration bus.  The tail
// pointers and the status register are read by the CPU interface.
module mem_system
  import dla_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_bus_t    cfg,
  input  logic [NUM_MEM_CH-1:0] in_valid,
  input  logic [63:0] in_data [NUM_MEM_CH],
  output logic [NUM_MEM_CH-1:0] in_ready,
  output axi_wr_req_t axi_req [NUM_AXI],
  input  axi_wr_rsp_t axi_rsp [NUM_AXI],
  output logic [31:0] tail [NUM_MEM_CH],
  input  logic        ev_overflow,
  input  logic        ev_button,
  input  logic        ev_clk_stable,
  output logic [31:0] isr
);
  burst_if ch_bus [NUM_MEM_CH] ();
  burst_if sw_bus [2:NUM_AXI-1] ();
  logic [NUM_MEM_CH-1:0] wdone;

  for (genvar k = 0; k < NUM_MEM_CH; k++) begin : g_ch
    mem_channel #(.REG_BASE(8'(4 * k))) u_ch (
      .clk, .rst_n, .cfg, .in_valid(in_valid[k]), .in_data(in_data[k]),
      .in_ready(in_ready[k]), .bus(ch_bus[k]), .tail(tail[k]),
      .write_done(wdone[k]));
  end

  // switched pairs
  burst_switch u_sw2 (.clk, .rst_n, .s0(ch_bus[13]), .s1(ch_bus[12]), .m(sw_bus[2]));
  burst_switch u_sw3 (.clk, .rst_n, .s0(ch_bus[11]), .s1(ch_bus[10]), .m(sw_bus[3]));
  burst_switch u_sw4 (.clk, .rst_n, .s0(ch_bus[9]),  .s1(ch_bus[8]),  .m(sw_bus[4]));
  burst_switch u_sw5 (.clk, .rst_n, .s0(ch_bus[7]),  .s1(ch_bus[6]),  .m(sw_bus[5]));
  burst_switch u_sw6 (.clk, .rst_n, .s0(ch_bus[5]),  .s1(ch_bus[4]),  .m(sw_bus[6]));
  burst_switch u_sw7 (.clk, .rst_n, .s0(ch_bus[3]),  .s1(ch_bus[2]),  .m(sw_bus[7]));

  // direct channels: sampler -> AXI 0, I2C 0 -> AXI 1
  axi_master #(.ID(3'd0)) u_axi0 (
    .clk, .rst_n, .bus(ch_bus[0]), .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]));
  axi_master #(.ID(3'd1)) u_axi1 (
    .clk, .rst_n, .bus(ch_bus[1]), .axi_req(axi_req[1]), .axi_rsp(axi_rsp[1]));
  for (genvar a = 2; a < NUM_AXI; a++) begin : g_axi
    axi_master #(.ID(3'(a))) u_axi (
      .clk, .rst_n, .bus(sw_bus[a]), .axi_req(axi_req[a]), .axi_rsp(axi_rsp[a]));
  end

  // interrupt status register, write 1 to clear
  always_ff @(posedge clk) begin
    if (!rst_n) isr <= '0;
    else begin
      if (cfg.valid && cfg.regnum == REG_MEM_ISR) isr <= isr & ~cfg.data;
      if (ev_overflow)   isr[ISR_OVERFLOW]   <= 1'b1;
      if (wdone != '0)   isr[ISR_WRITE_DONE] <= 1'b1;
      if (ev_button)     isr[ISR_BUTTON1]    <= 1'b1;
      if (ev_clk_stable) isr[ISR_CLK_STABLE] <= 1'b1;
    end
  end
endmodule
