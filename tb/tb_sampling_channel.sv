// tb_sampling_channel: self-checking test of one sampling channel.
// Small FIFOs (depth 4) are used so that the drop rules are exercised.
//  1. Six edges before the trigger with the pretrigger FIFO of 4: the two
//     oldest are dropped, so the initial-value packet carries the time and
//     level of the second edge, followed by edges 3-6, then the post-trigger
//     edges; times are checked against the spacing the testbench applied.
//     Output ready toggles randomly to check that packets are held.
//  2. Sampling stops max_num samples after the trigger, done pulses once the
//     buffers drained, and the channel returns to pretriggering.
//  3. Age discard: with max_age 20 and edges 30 samples apart only the last
//     edge survives in the pretrigger FIFO.
//  4. release_time below the head time holds the output back.
//  5. Post-trigger overflow is flagged when the output is blocked.
module tb_sampling_channel;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic din = 0, running = 0, trigger = 0, out_ready = 0;
  stime_t max_age = 1000, max_num = 200, release_time = '1;
  logic d_cur, d_prev, head_valid, out_valid, done, overflow;
  stime_t head_time;
  time_edge_t out_data;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  sampling_channel #(.PRE_DEPTH(4), .POST_DEPTH(4)) dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0d: %s", cyc, m); end
  endtask

  // collected output
  time_edge_t got [$];
  int done_cnt = 0, ovf_cnt = 0;
  logic rand_ready = 1;
  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_data);
    if (done) done_cnt++;
    if (overflow) ovf_cnt++;
  end
  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b0;

  int edge_cyc [$];
  task automatic toggle_after(input int n);
    repeat (n) @(negedge clk);
    din = ~din;
    edge_cyc.push_back(cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    running = 1;
    // ---- test 1: six pretrigger edges, 10 apart
    for (int i = 0; i < 6; i++) toggle_after(10);
    repeat (10) @(negedge clk);
    trigger = 1; @(negedge clk); trigger = 0;
    for (int i = 0; i < 3; i++) toggle_after(7);
    wait (done_cnt == 1);
    @(negedge clk);
    chk(got.size() == 1 + 4 + 3, $sformatf("packet count %0d", got.size()));
    foreach (got[i]) $display("pkt %0d t=%0d l=%0d", i, got[i].time_, got[i].level);
    if (got.size() == 8) begin
      // initial value: second edge (index 1), level after it = 0
      chk(got[0].level == 1'b0, "initial level");
      chk(got[1].time_ - got[0].time_ == 10, "initial time = dropped edge 2");
      for (int i = 1; i < 5; i++) chk(got[i].level == (i % 2 == 1), "pretrigger level");
      for (int i = 2; i < 5; i++) chk(got[i].time_ - got[i-1].time_ == 10, "pretrigger spacing");
      chk(got[5].time_ - got[4].time_ == stime_t'(edge_cyc[6] - edge_cyc[5]), "post spacing to trigger side");
      for (int i = 6; i < 8; i++) chk(got[i].time_ - got[i-1].time_ == 7, "post spacing");
      for (int i = 5; i < 8; i++) chk(got[i].level == (i % 2 == 1), "post level");
    end
    chk(done_cnt == 1, "done once");
    chk(dut.state == 2'd1, "back in pretrigger");
    // ---- test 2 covered above: check max_num stop (no edges after window)
    got.delete(); edge_cyc.delete();
    // ---- test 3: age discard
    max_age = 20; max_num = 40;
    din = 0; running = 0; @(negedge clk); running = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 4; i++) toggle_after(30);
    repeat (5) @(negedge clk);
    trigger = 1; @(negedge clk); trigger = 0;
    wait (done_cnt == 2);
    @(negedge clk);
    chk(got.size() == 2, $sformatf("age test packet count %0d", got.size()));
    if (got.size() == 2) begin
      chk(got[1].time_ - got[0].time_ == 30, "initial = previous (aged) edge");
      chk(got[0].level == 1'b1 && got[1].level == 1'b0, "age test levels");
    end
    // ---- test 4: release time gating
    got.delete();
    release_time = 0; max_num = 30;
    running = 0; @(negedge clk); running = 1;
    repeat (3) @(negedge clk);
    toggle_after(5);
    repeat (3) @(negedge clk);
    trigger = 1; @(negedge clk); trigger = 0;
    repeat (20) begin
      @(negedge clk);
      chk(!out_valid, "held by release time");
    end
    chk(head_valid, "head waiting");
    release_time = '1;
    wait (done_cnt == 3);
    chk(got.size() == 2, "released");
    // ---- test 5: overflow
    rand_ready = 0; max_num = 100; max_age = 1000;
    running = 0; @(negedge clk); running = 1;
    repeat (3) @(negedge clk);
    trigger = 1; @(negedge clk); trigger = 0;
    for (int i = 0; i < 6; i++) toggle_after(3);
    repeat (5) @(negedge clk);
    chk(ovf_cnt == 2, $sformatf("overflow count %0d", ovf_cnt));
    rand_ready = 1;
    wait (done_cnt == 4);
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
