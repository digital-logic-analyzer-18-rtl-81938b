// tb_burst_switch: self-checking test of the two-way burst switch.
// Two memory channels, each with its own 512-byte buffer, share one AXI
// master through the switch.  Both are fed numbered words at a high rate
// so they compete for the master.  Checks: both buffers receive all their
// words in order (the switch never mixes beats of two bursts), each
// grant made while both ask goes to the channel that did not have the
// last one, one channel really waited for the other, and the AXI port saw no protocol error.
module tb_burst_switch;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_bus_t cfg = '0;
  axi_wr_req_t axi_req [1];
  axi_wr_rsp_t axi_rsp [1];
  logic [1:0] in_valid = '0, in_ready, wdone;
  logic [63:0] in_data [2];
  logic [31:0] tail [2];
  int checks = 0, failures = 0;
  localparam int NW = 300;
  localparam logic [31:0] LEN = 32'h200;

  burst_if cb [2] ();
  burst_if mb ();
  for (genvar i = 0; i < 2; i++) begin : g_ch
    mem_channel #(.REG_BASE(8'(4 * i))) u_ch (.clk, .rst_n, .cfg, .in_valid(in_valid[i]),
      .in_data(in_data[i]), .in_ready(in_ready[i]), .bus(cb[i].master), .tail(tail[i]),
      .write_done(wdone[i]));
  end
  burst_switch dut (.clk, .rst_n, .s0(cb[0].slave), .s1(cb[1].slave), .m(mb.master));
  axi_master u_axi (.clk, .rst_n, .bus(mb.slave), .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]));
  axi_mem_model #(.N(1)) u_mem (.clk, .rst_n, .axi_req, .axi_rsp);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  task automatic wr(input int r, input logic [31:0] d);
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: 8'(r), data: d};
    @(negedge clk);
    cfg = '0;
  endtask

  int sent [2], waits = 0, contended = 0, alt_err = 0;
  logic last_g = 1'b1;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) if (in_valid[i] && in_ready[i]) sent[i] <= sent[i] + 1;
    if (dut.busy && (dut.sel ? cb[0].req_valid : cb[1].req_valid)) waits++;
    if (!dut.busy && cb[0].req_valid && cb[1].req_valid) begin
      contended++;
      if (dut.pick == last_g) alt_err++;
    end
    if (!dut.busy && (cb[0].req_valid || cb[1].req_valid)) last_g <= dut.pick;
  end
  for (genvar i = 0; i < 2; i++) begin : g_src
    assign in_data[i] = {16'hC0DE, 16'(i), 32'(sent[i])};
    always @(negedge clk)
      if (!(in_valid[i] && !in_ready[i])) in_valid[i] <= sent[i] < NW && $urandom_range(0, 7) != 0;
  end

  initial begin
    logic [31:0] head [2];
    int got [2], errs;
    sent[0] = 0; sent[1] = 0;
    head[0] = 0; head[1] = 0; got[0] = 0; got[1] = 0; errs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2; i++) begin
      wr(4 * i, 32'h0030_0000 + 32'(i) * 32'h1000);
      wr(4 * i + 1, LEN);
    end
    while (got[0] < NW || got[1] < NW) begin
      repeat ($urandom_range(10, 40)) @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        for (int guard = 0; head[i] != tail[i]; guard++) begin
          logic [63:0] w;
          if (guard > int'(LEN / 8)) begin errs++; break; end  // tail outside the buffer
          w = u_mem.peek(32'h0030_0000 + 32'(i) * 32'h1000 + head[i]);
          if (w != {16'hC0DE, 16'(i), 32'(got[i])}) errs++;
          got[i]++;
          head[i] = (head[i] + 8 == LEN) ? 0 : head[i] + 8;
        end
        wr(4 * i + 2, head[i]);
      end
    end
    chk(got[0] == NW && got[1] == NW, "all words of both channels");
    chk(errs == 0, $sformatf("%0d words wrong", errs));
    chk(waits > 0, "one channel waited while the other held the master");
    chk(alt_err == 0, $sformatf("%0d of %0d contended grants not alternating", alt_err, contended));
    chk(u_mem.proto_err == 0, "AXI protocol");
    $display("wait cycles: %0d, simultaneous requests: %0d, bursts: %0d", waits, contended, u_mem.bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
