// tb_sampler: self-checking test of the sampling module.
// The sampler is configured over the configuration bus (interface clock)
// while it samples on its own, unrelated sample clock.
//  Run 1: channels 0-3 enabled, trigger group 0 asks for a rising edge on
//  channel 2.  Channels 0, 1, 3 and the disabled channel 4 toggle before the
//  trigger, channel 2 first stays low.  Checks: no trigger before channel 2
//  rises; every enabled channel hands out one initial-value packet plus one
//  packet per edge seen; the disabled channel hands out nothing; all
//  packets, across channels, come out in time order; the channels stop
//  running when their run is over.
//  Run 2: manual trigger through the trigger control register.
module tb_sampler;
  import dla_pkg::*;
  logic clk = 0, sclk = 0, rst_n = 0, srst_n = 0;
  always #5 clk = ~clk;
  always #7 sclk = ~sclk;
  cfg_bus_t cfg = '0;
  logic [31:0] probe = 0, out_valid, out_ready, running;
  time_edge_t out_data [32];
  logic triggered, edge_lost;
  int checks = 0, failures = 0;

  sampler #(.PRE_DEPTH(8), .POST_DEPTH(8)) dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(input int off, input logic [31:0] d);
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: REG_SAMPLER_BASE + 8'(off), data: d};
    @(negedge clk);
    cfg = '0;
  endtask

  // collect handed-out packets
  int cnt [32] = '{default: 0};
  stime_t last_t = 0;
  logic first_seen [32];
  int order_err = 0, init_seen = 0;
  always @(negedge sclk) out_ready <= $urandom();
  always @(posedge sclk) if (srst_n) begin
    for (int i = 0; i < 32; i++) if (out_valid[i] && out_ready[i]) begin
      if (cnt[i] == 0) init_seen++;
      cnt[i]++;
      if (out_data[i].time_ < last_t) begin order_err++; if (order_err < 4) $display("order: ch %0d t %0d last %0d", i, out_data[i].time_, last_t); end
    end
    // times of packets handed out in one cycle are equal or later
    for (int i = 0; i < 32; i++) if (out_valid[i] && out_ready[i] && out_data[i].time_ > last_t)
      last_t = out_data[i].time_;
  end

  task automatic ptoggle(input int ch, input int n);
    repeat (n) @(negedge sclk);
    probe[ch] = ~probe[ch];
  endtask

  int edges [32];
  initial begin
    foreach (cnt[i]) begin cnt[i] = 0; edges[i] = 0; end
    last_t = 0;
    repeat (4) @(negedge clk);
    rst_n = 1; srst_n = 1;
    repeat (6) @(negedge sclk);
    wr(SREG_EN + 0, 32'h4);           // group 0: channel 2
    wr(SREG_VAL_HI + 0, 32'h0);       // previous sample 0
    wr(SREG_VAL_LO + 0, 32'h4);       // current sample 1: rising edge
    wr(SREG_MAX_NUM, 60);
    wr(SREG_MAX_AGE, 1000);
    wr(SREG_CHAN_EN, 32'hF);
    wr(SREG_TRIG_CTL, 32'h1);         // arm
    repeat (10) @(negedge sclk);
    chk(running == 32'hF, "running after arm");
    // pretrigger activity
    for (int k = 0; k < 3; k++) begin
      ptoggle(0, 3); edges[0]++;
      ptoggle(1, 2); edges[1]++;
      ptoggle(3, 4); edges[3]++;
      ptoggle(4, 1);
    end
    repeat (5) @(negedge sclk);
    chk(!triggered, "no trigger before the pattern");
    ptoggle(2, 1); edges[2]++;        // rising edge on channel 2
    repeat (4) @(negedge sclk);
    chk(triggered, "triggered by rising edge on channel 2");
    for (int k = 0; k < 4; k++) begin
      ptoggle(0, 2); edges[0]++;
      ptoggle(3, 3); edges[3]++;
      ptoggle(4, 1);
    end
    wait (running == 0);
    repeat (10) @(negedge sclk);
    for (int i = 0; i < 4; i++)
      chk(cnt[i] == edges[i] + 1, $sformatf("channel %0d packets %0d expected %0d", i, cnt[i], edges[i] + 1));
    chk(cnt[4] == 0, "disabled channel silent");
    chk(init_seen == 4, $sformatf("one initial packet per channel, %0d", init_seen));
    chk(order_err == 0, $sformatf("time order errors %0d", order_err));
    // run 2: manual trigger on channel 5 only
    foreach (cnt[i]) cnt[i] = 0;
    last_t = 0;
    wr(SREG_CHAN_EN, 32'h20);
    wr(SREG_TRIG_CTL, 32'h1);
    repeat (10) @(negedge sclk);
    ptoggle(5, 2);
    repeat (5) @(negedge sclk);
    chk(!triggered, "run 2 not yet triggered");
    wr(SREG_TRIG_CTL, 32'h2);         // manual trigger
    repeat (6) @(negedge sclk);
    chk(triggered, "manual trigger");
    ptoggle(5, 2);
    wait (running == 0);
    repeat (5) @(negedge sclk);
    chk(cnt[5] == 3, $sformatf("run 2 packets %0d", cnt[5]));
    chk(order_err == 0, "time order run 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
