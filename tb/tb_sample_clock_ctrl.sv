// tb_sample_clock_ctrl: self-checking test of the sample clock control.
// A small clock-manager model in the testbench drops its lock a few cycles
// after a reconfiguration request and locks again 40 cycles later.
// Checks: the multiplier/divider are twice the register halves, the
// request pulses once, the sampler reset is held while the clock is not
// stable and released (synchronously, within a few sample clocks) after
// lock, and the stable pulse comes exactly once per reconfiguration and
// only after lock.
module tb_sample_clock_ctrl;
  import dla_pkg::*;
  logic clk = 0, sclk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #3 sclk = ~sclk;
  cfg_bus_t cfg = '0;
  logic [6:0] mmcm_mult, mmcm_div;
  logic mmcm_reconfig, mmcm_locked = 0, srst_n, clk_stable;
  int checks = 0, failures = 0;
  int stable_cnt = 0, reconf_cnt = 0;

  sample_clock_ctrl dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // clock manager model
  initial begin
    repeat (20) @(posedge clk);
    mmcm_locked = 1;
    forever begin
      @(posedge clk iff (mmcm_reconfig && rst_n));
      repeat (3) @(posedge clk);
      mmcm_locked = 0;
      repeat (40) @(posedge clk);
      mmcm_locked = 1;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (clk_stable) begin
      stable_cnt++;
      chk(mmcm_locked, "stable only when locked");
    end
    if (mmcm_reconfig) reconf_cnt++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    chk(!srst_n, "held in reset before first lock");
    wait (stable_cnt == 1);
    repeat (4) @(negedge sclk);
    chk(srst_n, "released after first lock");
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: REG_SCLK_CFG, data: {20'd0, 6'd3, 6'd6}};
    @(negedge clk);
    cfg = '0;
    chk(mmcm_mult == 7'd12 && mmcm_div == 7'd6, "multiplier and divider");
    repeat (2) @(negedge clk);
    chk(!srst_n, "reset held during reconfiguration");
    repeat (30) @(negedge clk);
    chk(!srst_n && stable_cnt == 1, "still held while unlocked");
    wait (stable_cnt == 2);
    repeat (4) @(negedge sclk);
    chk(srst_n, "released after relock");
    repeat (100) @(negedge clk);
    chk(stable_cnt == 2 && reconf_cnt == 1, "one stable pulse per reconfiguration");
    // a write to another register changes nothing
    cfg = '{valid: 1'b1, regnum: REG_SCLK_CFG - 8'd1, data: 32'hFFF};
    @(negedge clk);
    cfg = '0;
    repeat (5) @(negedge clk);
    chk(reconf_cnt == 1 && srst_n && mmcm_mult == 7'd12, "other register ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
