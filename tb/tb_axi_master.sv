// tb_axi_master: self-checking test of the BurstIf-to-AXI write master.
// The testbench acts as a memory channel: it issues 40 bursts of random
// length (1..16 beats) to rising addresses, with random gaps in the data
// beats, into the behavioural AXI memory (which answers with random
// ready delays).  Checks: every beat lands at the right address, the AW
// fields are INCR / 8-byte / full strobes with the set ID, one done pulse
// comes per burst, and the memory model saw no protocol error.
module tb_axi_master;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axi_wr_req_t axi_req [1];
  axi_wr_rsp_t axi_rsp [1];
  int checks = 0, failures = 0;
  burst_if bus ();
  axi_master #(.ID(3'd5)) dut (.clk, .rst_n, .bus(bus.slave), .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]));
  axi_mem_model #(.N(1)) u_mem (.clk, .rst_n, .axi_req, .axi_rsp);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  int dones = 0, field_err = 0;
  always @(posedge clk) if (rst_n) begin
    if (bus.done) dones++;
    if (axi_req[0].awvalid && (axi_req[0].awsize != 3'd3 || axi_req[0].awburst != 2'b01 ||
        axi_req[0].awid != 3'd5 || axi_req[0].awcache != 4'b1111)) field_err++;
    if (axi_req[0].wvalid && (axi_req[0].wstrb != 8'hFF || axi_req[0].wid != 3'd5)) field_err++;
  end

  initial begin
    logic [31:0] a;
    int n, words;
    bus.req_valid = 0; bus.wvalid = 0; bus.wlast = 0; bus.req_addr = 0; bus.req_len = 0; bus.wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    a = 32'h0002_0000; words = 0;
    for (int b = 0; b < 40; b++) begin
      n = $urandom_range(1, 16);
      bus.req_valid = 1; bus.req_addr = a; bus.req_len = 4'(n - 1);
      do @(posedge clk); while (!bus.req_ready);
      @(negedge clk);
      bus.req_valid = 0;
      for (int k = 0; k < n; k++) begin
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        bus.wvalid = 1; bus.wdata = {32'hFEED_0000, 32'(words + k)}; bus.wlast = k == n - 1;
        do @(posedge clk); while (!bus.wready);
        @(negedge clk);
        bus.wvalid = 0;
      end
      while (dones <= b) @(negedge clk);
      a += 32'(n * 8); words += n;
    end
    for (int w = 0; w < words; w++)
      if (u_mem.peek(32'h0002_0000 + 32'(w * 8)) != {32'hFEED_0000, 32'(w)}) begin
        chk(0, $sformatf("word %0d", w)); break;
      end
    chk(1, "words checked");
    chk(dones == 40, $sformatf("%0d done pulses", dones));
    chk(u_mem.bursts == 40 && u_mem.beats_total == words, "bursts and beats counted by memory");
    chk(field_err == 0, "AW/W fields");
    chk(u_mem.proto_err == 0, "AXI protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
