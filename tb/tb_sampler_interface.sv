// tb_sampler_interface: self-checking test of the sample router.
// Channel 3 is routed to functional input 9 (both routing registers set),
// channel 5 has no functional reader, channel 7 is named by input 20 but
// its destination register does not agree.  Packets are pushed on the
// sample clock, consumers are randomly not ready on the interface clock.
// Checks: input 9 receives exactly channel 3's packets in order; memory
// receives channel 5's and channel 7's packets in order; every channel-3
// packet either reaches memory too or is counted as lost, and the overflow
// pulses add up to the lost copies; input 20 never sees a valid sample.
module tb_sampler_interface;
  import dla_pkg::*;
  logic clk = 0, sclk = 0, rst_n = 0, srst_n = 0;
  always #5 clk = ~clk;
  always #4 sclk = ~sclk;
  cfg_bus_t cfg = '0;
  logic [31:0] ch_valid = 0, ch_ready;
  time_edge_t ch_data [32];
  logic [46:0] fi_valid, fi_ready;
  time_edge_t fi_data [47];
  logic [31:0] mem_valid, mem_ready;
  time_edge_t mem_data [32];
  logic overflow;
  int checks = 0, failures = 0;

  sampler_interface dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic wr(input int off, input logic [31:0] d);
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: REG_SI_BASE + 8'(off), data: d};
    @(negedge clk);
    cfg = '0;
  endtask

  localparam int NPK = 200;
  int sent3 = 0, sent5 = 0, sent7 = 0;
  int got_fi = 0, got_m3 = 0, got_m5 = 0, got_m7 = 0, lost = 0, ovf = 0, bad20 = 0;
  int exp_fi = 0, exp_m5 = 0, exp_m7 = 0, seq_err = 0;
  logic go = 0;

  // producers (sample clock)
  always @(negedge sclk) begin
    for (int c = 0; c < 32; c++) ch_data[c] = '0;
    ch_valid = 0;
    if (go) begin
      if (sent3 < NPK && $urandom_range(0, 1)) begin ch_valid[3] = 1; ch_data[3] = '{time_: 31'(sent3), level: 1'b1}; end
      if (sent5 < NPK && $urandom_range(0, 1)) begin ch_valid[5] = 1; ch_data[5] = '{time_: 31'(sent5), level: 1'b0}; end
      if (sent7 < NPK && $urandom_range(0, 1)) begin ch_valid[7] = 1; ch_data[7] = '{time_: 31'(sent7), level: 1'b1}; end
    end
  end
  always @(posedge sclk) if (srst_n) begin
    if (ch_valid[3] && ch_ready[3]) sent3++;
    if (ch_valid[5] && ch_ready[5]) sent5++;
    if (ch_valid[7] && ch_ready[7]) sent7++;
  end
  // consumers (interface clock)
  always @(negedge clk) begin
    fi_ready = '0;
    fi_ready[9] = $urandom_range(0, 2) != 0;
    fi_ready[20] = 1'b1;
    mem_ready = '1;
    if ($urandom_range(0, 4) == 0) mem_ready = '0;
  end
  always @(posedge clk) if (rst_n && go) begin
    if (fi_valid[9] && fi_ready[9]) begin
      got_fi++;
      if (fi_data[9].time_ != 31'(exp_fi)) seq_err++;
      exp_fi++;
      if (!mem_ready[3]) lost++;
    end
    if (fi_valid[20]) bad20++;
    if (mem_valid[3]) got_m3++;
    if (mem_valid[5]) begin got_m5++; if (mem_data[5].time_ != 31'(exp_m5)) seq_err++; exp_m5++; end
    if (mem_valid[7]) begin got_m7++; if (mem_data[7].time_ != 31'(exp_m7)) seq_err++; exp_m7++; end
    if (overflow) ovf++;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1; srst_n = 1;
    repeat (6) @(negedge clk);
    wr(SIREG_INSEL + 9, 3);
    wr(SIREG_DEST + 3, 9);
    wr(SIREG_INSEL + 20, 7);
    go = 1;
    wait (sent3 == NPK && sent5 == NPK && sent7 == NPK);
    repeat (100) @(negedge clk);
    chk(got_fi == NPK, $sformatf("functional input got %0d", got_fi));
    chk(got_m5 == NPK && got_m7 == NPK, $sformatf("memory got %0d %0d", got_m5, got_m7));
    chk(got_m3 + lost == NPK, $sformatf("copies %0d + lost %0d", got_m3, lost));
    chk(lost > 0 && ovf == lost, $sformatf("overflow pulses %0d lost %0d", ovf, lost));
    chk(seq_err == 0, "order");
    chk(bad20 == 0, "input without agreeing destination stays idle");
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
