// tb_dla_top: end-to-end test of the whole logic analyzer at full size.
// dla_top is used with no parameter changes (32 sampling channels, 47
// functional inputs, 14 memory channels, 8 AXI ports), so this is also the
// full-size testbench.  Around it the testbench models the parts that are
// not in the RTL: a processor that writes and reads registers over the
// general-purpose AXI port, a clock manager whose sample-clock period
// follows the multiply/divide values and which drops "locked" for a while
// after each reconfiguration, and a memory that takes the eight AXI write
// ports.  The probes carry an I2C transaction, an SPI word, UART bytes, an
// external-memory write cycle, a square wave, a trigger line and a burst of
// pretrigger edges.  The run:
//   1. wait for the first clock lock, program every block over AXI, arm
//      the sampler with a rising-edge trigger on probe 26;
//   2. pretrigger burst on probe 27 (more edges than the pretrigger FIFO
//      holds, so old ones are dropped), then the trigger edge, then the
//      protocol traffic and the square wave; two UARTs on one burst switch
//      send at the same time so they compete for the AXI port;
//   3. after the run, read the tail pointers over AXI and decode memory:
//      sampler words in time order with the right edge counts, and the
//      decoded I2C / SPI / UART / external-memory words;
//   4. overflow: the sampler memory buffer is made tiny and not read, so a
//      channel copy towards memory is lost while its decoder still reads it;
//   5. clock reconfiguration, the clock-stable interrupt, the button
//      interrupt, and a short manual-trigger run on the new sample clock.
// Every mechanism is counted and printed at the end.
module tb_dla_top;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0, sclk = 0, mmcm_locked = 0, button1 = 0;
  always #5 clk = ~clk;
  int hp = 5;
  always #(hp) sclk = ~sclk;
  logic [6:0] mmcm_mult, mmcm_div;
  logic mmcm_reconfig, irq, sample_lost;
  logic [31:0] probe = '0;
  logic [31:0] s_awaddr = 0, s_wdata = 0, s_araddr = 0, s_rdata;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [1:0] s_bresp, s_rresp;
  axi_wr_req_t axi_req [NUM_AXI];
  axi_wr_rsp_t axi_rsp [NUM_AXI];
  int checks = 0, failures = 0;

  dla_top dut (.*);
  axi_mem_model #(.N(NUM_AXI)) u_mem (.clk, .rst_n, .axi_req, .axi_rsp);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // ---------------- clock manager model ----------------
  int reconfigs = 0;
  initial begin
    repeat (20) @(posedge clk);
    mmcm_locked = 1;
  end
  always @(posedge clk) if (rst_n && mmcm_reconfig) begin
    reconfigs++;
    fork begin
      mmcm_locked = 0;
      repeat (40) @(posedge clk);
      hp = (5 * int'(mmcm_div)) / int'(mmcm_mult);
      if (hp < 1) hp = 1;
      mmcm_locked = 1;
    end join_none
  end

  // ---------------- processor model (AXI general-purpose port) ----------------
  task automatic reg_wr(input int r, input logic [31:0] d);
    @(negedge clk);
    s_awaddr = 32'(r) << 2; s_awvalid = 1; s_wdata = d; s_wvalid = 1; s_bready = 1;
    fork
      begin do @(posedge clk); while (!s_awready); @(negedge clk) s_awvalid = 0; end
      begin do @(posedge clk); while (!s_wready);  @(negedge clk) s_wvalid = 0; end
    join
    while (!s_bvalid) @(negedge clk);
    @(negedge clk) s_bready = 0;
  endtask
  task automatic reg_rd(input int r, output logic [31:0] d);
    @(negedge clk);
    s_araddr = 32'(r) << 2; s_arvalid = 1; s_rready = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk) s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk) s_rready = 0;
  endtask
  task automatic route(input int p, input int fi);
    reg_wr(REG_SI_BASE + SIREG_INSEL + fi, 32'(p));
    reg_wr(REG_SI_BASE + SIREG_DEST + p, 32'(fi));
  endtask

  // ---------------- probe drivers (one change per sample clock) ----------------
  task automatic ps(input int p, input logic v, input int n = 6);
    probe[p] = v;
    repeat (n) @(negedge sclk);
  endtask
  localparam int P_SCL = 0, P_SDA = 1, P_SCK = 2, P_MOSI = 3, P_MISO = 4, P_SS = 5;
  localparam int P_UART = 6, P_XAD = 7, P_XA = 15, P_XRD = 23, P_XWR = 24, P_XALE = 25;
  localparam int P_TRIG = 26, P_BURST = 27, P_SQ = 28, P_U1 = 29, P_U2 = 30;

  task automatic i2c_bit(input logic b);
    ps(P_SDA, b); ps(P_SCL, 1); ps(P_SCL, 0);
  endtask
  task automatic i2c_xfer(input logic [6:0] a, input logic [7:0] d);
    ps(P_SDA, 0); ps(P_SCL, 0);                       // start
    for (int i = 6; i >= 0; i--) i2c_bit(a[i]);
    i2c_bit(0);                                       // write
    i2c_bit(0);                                       // ack
    for (int i = 7; i >= 0; i--) i2c_bit(d[i]);
    i2c_bit(0);                                       // ack
    ps(P_SDA, 0); ps(P_SCL, 1); ps(P_SDA, 1);         // stop
  endtask
  task automatic spi_word(input logic [7:0] mo, input logic [7:0] mi);
    ps(P_SS, 0);
    for (int i = 0; i < 8; i++) begin                 // mode 0, LSB first
      probe[P_MOSI] = mo[i]; ps(P_MISO, mi[i]);
      ps(P_SCK, 1, 3); ps(P_SCK, 0, 3);
    end
    ps(P_SS, 1);
  endtask
  task automatic uart_byte(input int p, input logic [7:0] d);  // 8N1, 16 samples per bit
    ps(p, 0, 16);
    for (int i = 0; i < 8; i++) ps(p, d[i], 16);
    ps(p, 1, 32);
  endtask
  task automatic uart_pair(input logic [7:0] d);           // same frame on two lines
    probe[P_U1] = 0; ps(P_U2, 0, 16);
    for (int i = 0; i < 8; i++) begin probe[P_U1] = d[i]; ps(P_U2, d[i], 16); end
    probe[P_U1] = 1; ps(P_U2, 1, 32);
  endtask
  task automatic xmem_write(input logic [15:0] a, input logic [7:0] d);
    for (int i = 0; i < 8; i++) ps(P_XA + i, a[8 + i], 1);
    for (int i = 0; i < 8; i++) ps(P_XAD + i, a[i], 1);
    ps(P_XALE, 1); ps(P_XALE, 0);
    for (int i = 0; i < 8; i++) ps(P_XAD + i, d[i], 1);
    ps(P_XWR, 0, 3); ps(P_XWR, 1);
  endtask

  // ---------------- monitors ----------------
  int drops = 0, ovf_pulses = 0, sw_waits = 0, srst_falls = 0, trig_seen = 0;
  logic srst_q = 0, trig_q = 0;
  for (genvar c = 0; c < NUM_CHANNELS; c++) begin : g_mon
    always @(posedge sclk) if (dut.srst_n && dut.u_sampler.g_ch[c].u_ch.drop_full) drops++;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.overflow) ovf_pulses++;
    if (dut.u_mem.u_sw3.busy && dut.u_mem.g_ch[10].u_ch.state == 2'd1 &&
        dut.u_mem.g_ch[11].u_ch.state == 2'd1) sw_waits++;
    if (dut.u_mem.u_sw3.busy && dut.u_mem.u_sw3.sel == 1'b1 && dut.u_mem.g_ch[11].u_ch.state == 2'd1) sw_waits++;
    if (dut.u_mem.u_sw3.busy && dut.u_mem.u_sw3.sel == 1'b0 && dut.u_mem.g_ch[10].u_ch.state == 2'd1) sw_waits++;
    srst_q <= dut.srst_n;
    if (srst_q && !dut.srst_n) srst_falls++;
  end
  always @(posedge sclk) if (dut.srst_n) begin
    trig_q <= dut.u_sampler.triggered;
    if (dut.u_sampler.triggered && !trig_q) trig_seen++;
  end

  localparam logic [31:0] B0 = 32'h0100_0000, L0 = 32'h4000;
  function automatic logic [31:0] base_of(int m);
    return B0 + 32'(m) * 32'h0001_0000;
  endfunction

  int sq_edges = 0, burst_edges = 0;
  int used_ch [7] = '{0, 1, 5, 9, 10, 11, 13};
  initial begin
    logic [31:0] d, tl;
    logic [63:0] w;
    int cnt [NUM_CHANNELS];
    int order_err, types, n_i2c_ok, n_spi_ok, n_uart_ok, n_x_ok, n_u12;
    logic [30:0] last_t [NUM_CHANNELS];
    // idle line levels
    probe[P_SCL] = 1; probe[P_SDA] = 1; probe[P_SS] = 1; probe[P_UART] = 1;
    probe[P_XRD] = 1; probe[P_XWR] = 1; probe[P_U1] = 1; probe[P_U2] = 1;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (dut.srst_n);
    trig_seen = 0;
    reg_rd(REG_MEM_ISR, d);
    chk(d[ISR_CLK_STABLE] && irq, "first lock reported as clock-stable interrupt");
    reg_wr(REG_MEM_ISR, 32'hFFFF_FFFF);
    chk(!irq, "interrupt cleared");

    // memory channels: sampler, I2C0, SPI0, UART0, UART1, UART2, XMEM
    for (int i = 0; i < 7; i++) begin
      int m;
      m = used_ch[i];
      reg_wr(REG_MEM_BASE + 4 * m, base_of(m));
      reg_wr(REG_MEM_BASE + 4 * m + 1, L0);
    end
    // routing of probes to functional inputs
    route(P_SCL, FI_I2C); route(P_SDA, FI_I2C + 1);
    for (int i = 0; i < 4; i++) route(P_SCK + i, FI_SPI + i);
    route(P_UART, FI_UART); route(P_U1, FI_UART + 1); route(P_U2, FI_UART + 2);
    for (int i = 0; i < 19; i++) route(P_XAD + i, FI_XMEM + i);
    // sampler: trigger group 0 = rising edge on probe 26
    reg_wr(REG_SAMPLER_BASE + SREG_EN, 32'(1) << P_TRIG);
    reg_wr(REG_SAMPLER_BASE + SREG_VAL_HI, 0);
    reg_wr(REG_SAMPLER_BASE + SREG_VAL_LO, 32'(1) << P_TRIG);
    reg_wr(REG_SAMPLER_BASE + SREG_MAX_NUM, 6000);
    reg_wr(REG_SAMPLER_BASE + SREG_MAX_AGE, 32'h10_0000);
    reg_wr(REG_SAMPLER_BASE + SREG_CHAN_EN, 32'h7FFF_FFFF);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 1);
    repeat (10) @(negedge sclk);

    // pretrigger burst: 40 edges, more than the pretrigger FIFO holds
    for (int i = 0; i < 40; i++) begin ps(P_BURST, !probe[P_BURST]); burst_edges++; end
    repeat (10) @(negedge sclk);
    chk(trig_seen == 0, "no trigger before the trigger edge");
    ps(P_TRIG, 1, 10);
    repeat (300) @(negedge sclk);       // let the pretrigger data drain first
    chk(trig_seen == 1, "trigger on rising edge of probe 26");
    fork
      begin
        i2c_xfer(7'h50, 8'h7E);
        spi_word(8'hA5, 8'h3C);
        xmem_write(16'h12AB, 8'h5C);
        uart_byte(P_UART, 8'h55);
        uart_byte(P_UART, 8'hFF);
        uart_pair(8'hC3);
        uart_pair(8'h18);
        uart_pair(8'h99);
        uart_pair(8'hFF);            // a frame is decoded when a later edge arrives
      end
      for (int i = 0; i < 100; i++) begin ps(P_SQ, !probe[P_SQ], 20); sq_edges++; end
    join
    wait (dut.u_sampler.running == '0);
    repeat (400) @(negedge clk);

    // ---- read back the sampler memory channel ----
    foreach (cnt[c]) cnt[c] = 0;
    order_err = 0;
    foreach (last_t[c]) last_t[c] = 0;
    reg_rd(REG_MEM_BASE + 3, tl);
    for (logic [31:0] a = 0; a < tl; a += 8) begin
      w = u_mem.peek(B0 + a);
      if (w[31:1] < last_t[w[36:32]]) order_err++;
      last_t[w[36:32]] = w[31:1];
      cnt[w[36:32]]++;
    end
    chk(order_err == 0, $sformatf("sampler words of each channel in time order (%0d errors)", order_err));
    chk(cnt[P_SQ] == sq_edges + 1, $sformatf("square wave: %0d words for %0d edges", cnt[P_SQ], sq_edges));
    chk(cnt[P_TRIG] == 2, "trigger line: initial level + edge");
    chk(cnt[P_BURST] > 1 && cnt[P_BURST] < burst_edges + 1,
        $sformatf("pretrigger burst: %0d of %0d edges kept", cnt[P_BURST] - 1, burst_edges));
    chk(drops > 0, "pretrigger drops counted");
    chk(cnt[P_SCL] > 0 && cnt[P_SCK] > 0 && cnt[P_XWR] > 0, "routed channels also copied to memory");
    chk(cnt[31] == 0, "disabled channel 31 silent");
    chk(!sample_lost, "no post-trigger edge lost");
    reg_wr(REG_MEM_BASE + 2, tl);                      // driver frees the data

    // ---- decoded words ----
    n_i2c_ok = 0; types = 0;
    reg_rd(REG_MEM_BASE + 4 * 1 + 3, tl);
    for (logic [31:0] a = 0; a < tl; a += 8) begin
      w = u_mem.peek(base_of(1) + a);
      types = types * 10 + int'(w[63:61]);
      if (w[63:61] == 3'd3 && w[6:0] == 7'h50 && w[25] && !w[24]) n_i2c_ok++;
      if (w[63:61] == 3'd4 && w[7:0] == 8'h7E && w[25]) n_i2c_ok++;
    end
    chk(types == 1342 && n_i2c_ok == 2, $sformatf("I2C: start/address/data/stop, got types %0d", types));
    n_spi_ok = 0;
    reg_rd(REG_MEM_BASE + 4 * 5 + 3, tl);
    chk(tl == 16, $sformatf("SPI: two words, tail %0d", tl));
    if (u_mem.peek(base_of(5)) == {1'b1, u_mem.peek(base_of(5))[62:32], 32'hA5}) n_spi_ok++;
    if (u_mem.peek(base_of(5) + 8) == {1'b1, u_mem.peek(base_of(5) + 8)[62:32], 32'h3C}) n_spi_ok++;
    chk(n_spi_ok == 2, "SPI MOSI and MISO bytes");
    n_uart_ok = 0;
    reg_rd(REG_MEM_BASE + 4 * 9 + 3, tl);
    w = u_mem.peek(base_of(9));
    chk(tl >= 8 && w[63] && w[7:0] == 8'h55 && w[9:8] == 0, "UART byte 0x55");
    n_u12 = 0;
    for (int m = 10; m <= 11; m++) begin
      reg_rd(REG_MEM_BASE + 4 * m + 3, tl);
      if (tl >= 24 && u_mem.peek(base_of(m))[7:0] == 8'hC3 && u_mem.peek(base_of(m) + 8)[7:0] == 8'h18 &&
          u_mem.peek(base_of(m) + 16)[7:0] == 8'h99) n_u12++;
    end
    chk(n_u12 == 2, "UART1 and UART2 bytes through the shared burst switch");
    chk(sw_waits > 0, "burst switch contention seen");
    n_x_ok = 0;
    reg_rd(REG_MEM_BASE + 4 * 13 + 3, tl);
    w = u_mem.peek(base_of(13));
    chk(tl == 8 && w[63] && w[24] && w[23:16] == 8'h12 && w[15:8] == 8'hAB && w[7:0] == 8'h5C,
        $sformatf("external-memory write cycle %h", w));
    reg_rd(REG_MEM_ISR, d);
    chk(d[ISR_WRITE_DONE] && !d[ISR_OVERFLOW], "write-done interrupt, no overflow yet");
    reg_wr(REG_MEM_ISR, 32'hFFFF_FFFF);

    // ---- overflow: tiny, unread sampler buffer ----
    // run 2: only the SPI lines are sampled; their decoder keeps reading
    // them while the copies towards the blocked sampler buffer are lost
    reg_wr(REG_MEM_BASE + 1, 32'h40);
    reg_wr(REG_MEM_BASE + 2, 0);
    reg_wr(REG_SAMPLER_BASE + SREG_MAX_NUM, 3000);
    reg_wr(REG_SAMPLER_BASE + SREG_CHAN_EN, 32'hF << P_SCK);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 1);
    repeat (10) @(negedge sclk);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 2);       // manual trigger
    for (int i = 0; i < 6; i++) spi_word(8'(i), 8'(i + 1));
    repeat (200) @(negedge clk);
    reg_rd(REG_MEM_ISR, d);
    chk(trig_seen == 2, "manual trigger");
    chk(d[ISR_OVERFLOW] && irq, "overflow interrupt");
    chk(ovf_pulses > 0, "overflow pulses counted");
    reg_rd(REG_MEM_BASE + 4 * 5 + 3, tl);
    chk(tl == 16 + 6 * 16, $sformatf("SPI decoding continued during the overflow, tail %0d", tl));
    wait (dut.u_sampler.running == '0);
    // run 3: only the square wave, sampler buffer still blocked, so the
    // post-trigger FIFO fills up and edges are lost
    reg_wr(REG_SAMPLER_BASE + SREG_CHAN_EN, 32'(1) << P_SQ);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 1);
    repeat (10) @(negedge sclk);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 2);
    for (int i = 0; i < 60; i++) ps(P_SQ, !probe[P_SQ], 4);
    chk(trig_seen == 3, "manual trigger, run 3");
    chk(sample_lost, "post-trigger FIFO overflow flagged");
    // release the buffer so the run can finish
    reg_wr(REG_MEM_BASE + 1, L0);
    reg_wr(REG_MEM_BASE + 2, 0);
    wait (dut.u_sampler.running == '0);
    repeat (100) @(negedge clk);
    reg_wr(REG_MEM_ISR, 32'hFFFF_FFFF);

    // ---- clock reconfiguration and button ----
    reg_wr(REG_SCLK_CFG, (32'd5 << 6) | 32'd10);       // multiply 20, divide 10
    wait (!dut.srst_n);
    wait (dut.srst_n);
    reg_rd(REG_MEM_ISR, d);
    chk(reconfigs == 1 && mmcm_mult == 7'd20 && mmcm_div == 7'd10, "clock manager reprogrammed");
    chk(srst_falls == 1, "sample domain held in reset while unlocked");
    chk(d[ISR_CLK_STABLE] && irq, "clock-stable interrupt after reconfiguration");
    chk(hp == 2, "sample clock sped up");
    button1 = 1; repeat (5) @(negedge clk); button1 = 0;
    reg_rd(REG_MEM_ISR, d);
    chk(d[ISR_BUTTON1], "button interrupt");
    reg_wr(REG_MEM_ISR, 32'hFFFF_FFFF);
    // short run on the new clock (sampler state was reset with the clock)
    reg_wr(REG_MEM_BASE + 1, L0);
    reg_wr(REG_SAMPLER_BASE + SREG_MAX_NUM, 400);
    reg_wr(REG_SAMPLER_BASE + SREG_CHAN_EN, 32'(1) << P_SQ);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 1);
    repeat (10) @(negedge sclk);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 2);
    for (int i = 0; i < 10; i++) ps(P_SQ, !probe[P_SQ], 10);
    wait (dut.u_sampler.running == '0);
    repeat (100) @(negedge clk);
    reg_rd(REG_MEM_BASE + 3, tl);
    chk(tl == 11 * 8, $sformatf("run on new clock: %0d words", tl / 8));
    chk(u_mem.proto_err == 0, "AXI protocol on all ports");

    $display("mechanisms: triggers=%0d pretrigger_drops=%0d overflow_pulses=%0d switch_wait_cycles=%0d clock_reconfigs=%0d sample_resets=%0d bursts=%0d",
             trig_seen, drops, ovf_pulses, sw_waits, reconfigs, srst_falls, u_mem.bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
