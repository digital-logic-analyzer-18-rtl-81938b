// tb_workload_square: square-wave capture workload on the full analyzer.
// Square waves of three frequencies are sampled at the default (full) size
// of dla_top, with the sample clock equal to the interface clock (think of
// both as 100 MHz):
//   probe 0: 15 MHz  - half periods alternate 3 and 4 samples (6.67 per period)
//   probe 1:  1 MHz  - half period 50 samples
//   probe 2:  1 kHz  - half period 50,000 samples (two full periods)
// The run is started with a manual trigger; the testbench plays the driver,
// reading the raw-sample buffer (memory channel 0) over the processor port
// while the run goes on.  Checks: every edge of every wave is in memory,
// each channel's initial level is right, and the time between successive
// edges of each channel equals the driven half period, sample for sample.
module tb_workload_square;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0, mmcm_locked = 0, button1 = 0;
  always #5 clk = ~clk;
  wire sclk = clk;
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

  localparam logic [31:0] B0 = 32'h0200_0000, L0 = 32'h2000;
  localparam int HALF1 = 50, HALF2 = 50000;
  int n_edges [3] = '{0, 0, 0}, got [3] = '{0, 0, 0}, bad_gap [3] = '{0, 0, 0};
  int init_ok = 0;
  logic [30:0] last [3];
  logic go = 0;

  // wave generators, one probe change per sample clock edge
  initial begin
    wait (go);
    forever begin
      repeat (3) @(negedge sclk); probe[0] = ~probe[0]; n_edges[0]++;
      repeat (4) @(negedge sclk); probe[0] = ~probe[0]; n_edges[0]++;
      if (!go) break;
    end
  end
  initial begin
    wait (go);
    while (go) begin repeat (HALF1) @(negedge sclk); probe[1] = ~probe[1]; n_edges[1]++; end
  end
  initial begin
    wait (go);
    for (int i = 0; i < 4; i++) begin repeat (HALF2) @(negedge sclk); probe[2] = ~probe[2]; n_edges[2]++; end
  end

  // driver: consume raw words between head and tail
  logic [31:0] head = 0;
  task automatic consume();
    logic [31:0] tl;
    logic [63:0] w;
    int c;
    reg_rd(REG_MEM_BASE + 3, tl);
    for (int guard = 0; head != tl && guard < int'(L0 / 8); guard++) begin
      w = u_mem.peek(B0 + head);
      c = int'(w[36:32]);
      if (c < 3) begin
        if (got[c] == 0) begin
          if (w[0] == 1'b0) init_ok++;
        end else if (c == 0) begin
          // 15 MHz wave: gaps alternate 3 and 4 (first gap after the initial packet is not checked)
          if (got[c] > 1 && w[31:1] - last[c] != 31'(got[c] % 2 == 0 ? 3 : 4) &&
              w[31:1] - last[c] != 31'(got[c] % 2 == 0 ? 4 : 3)) bad_gap[c]++;
        end else if (got[c] > 1 && w[31:1] - last[c] != 31'(c == 1 ? HALF1 : HALF2)) bad_gap[c]++;
        last[c] = w[31:1];
        got[c]++;
      end
      head = (head + 8 == L0) ? 0 : head + 8;
    end
    reg_wr(REG_MEM_BASE + 2, head);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    mmcm_locked = 1;
    wait (dut.srst_n);
    reg_wr(REG_MEM_BASE, B0);
    reg_wr(REG_MEM_BASE + 1, L0);
    reg_wr(REG_SAMPLER_BASE + SREG_MAX_NUM, 4 * HALF2 + 1000);
    reg_wr(REG_SAMPLER_BASE + SREG_CHAN_EN, 32'h7);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 1);
    repeat (10) @(negedge clk);
    reg_wr(REG_SAMPLER_BASE + SREG_TRIG_CTL, 2);
    go = 1;
    while (n_edges[2] < 4) begin repeat (200) @(negedge clk); consume(); end
    go = 0;
    wait (dut.u_sampler.running == '0);
    repeat (200) @(negedge clk);
    consume();
    $display("edges driven %0d/%0d/%0d, words %0d/%0d/%0d", n_edges[0], n_edges[1], n_edges[2], got[0], got[1], got[2]);
    for (int c = 0; c < 3; c++) begin
      chk(got[c] == n_edges[c] + 1, $sformatf("wave %0d: %0d words for %0d edges", c, got[c], n_edges[c]));
      chk(bad_gap[c] == 0, $sformatf("wave %0d: %0d wrong edge spacings", c, bad_gap[c]));
    end
    chk(init_ok == 3, "initial levels low");
    chk(!sample_lost && !dut.u_mem.isr[ISR_OVERFLOW], "nothing lost");
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
