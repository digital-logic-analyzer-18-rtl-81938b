// tb_mem_system: self-checking test of the whole memory system.
// All 14 memory channels get their own 256-byte buffer and are fed
// numbered words at once; the eight AXI ports go to one behavioural
// memory.  The testbench plays the driver for every channel (reads the
// tail, checks the words, writes the head back).  It also pulses the
// overflow, button and clock-stable events and clears the interrupt
// status register by writing ones.  Checks: every channel's words arrive
// in order, all eight AXI ports carry bursts, each status bit is set by
// its event and cleared by the write, and no AXI protocol error occurs.
module tb_mem_system;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_bus_t cfg = '0;
  logic [NUM_MEM_CH-1:0] in_valid = '0, in_ready;
  logic [63:0] in_data [NUM_MEM_CH];
  axi_wr_req_t axi_req [NUM_AXI];
  axi_wr_rsp_t axi_rsp [NUM_AXI];
  logic [31:0] tail [NUM_MEM_CH], isr;
  logic ev_overflow = 0, ev_button = 0, ev_clk_stable = 0;
  int checks = 0, failures = 0;
  localparam int NW = 120;
  localparam logic [31:0] LEN = 32'h100;

  mem_system dut (.clk, .rst_n, .cfg, .in_valid, .in_data, .in_ready, .axi_req, .axi_rsp,
    .tail, .ev_overflow, .ev_button, .ev_clk_stable, .isr);
  axi_mem_model #(.N(NUM_AXI)) u_mem (.clk, .rst_n, .axi_req, .axi_rsp);

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
  function automatic logic [31:0] base_of(int c);
    return 32'h0040_0000 + 32'(c) * 32'h0000_0400;
  endfunction

  int sent [NUM_MEM_CH], port_bursts [NUM_AXI];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NUM_MEM_CH; c++) if (in_valid[c] && in_ready[c]) sent[c] <= sent[c] + 1;
    for (int p = 0; p < NUM_AXI; p++) if (axi_req[p].awvalid && axi_rsp[p].awready) port_bursts[p]++;
  end
  for (genvar c = 0; c < NUM_MEM_CH; c++) begin : g_src
    assign in_data[c] = {8'h5A, 8'(c), 16'd0, 32'(sent[c])};
    always @(negedge clk)
      if (!(in_valid[c] && !in_ready[c])) in_valid[c] <= sent[c] < NW && $urandom_range(0, 3) == 0;
  end

  initial begin
    logic [31:0] head [NUM_MEM_CH];
    int got [NUM_MEM_CH], errs, busy_ports;
    logic all_got;
    errs = 0;
    for (int c = 0; c < NUM_MEM_CH; c++) begin sent[c] = 0; head[c] = 0; got[c] = 0; end
    for (int p = 0; p < NUM_AXI; p++) port_bursts[p] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NUM_MEM_CH; c++) begin
      wr(4 * c, base_of(c));
      wr(4 * c + 1, LEN);
    end
    all_got = 0;
    while (!all_got) begin
      repeat ($urandom_range(10, 40)) @(negedge clk);
      all_got = 1;
      for (int c = 0; c < NUM_MEM_CH; c++) begin
        for (int guard = 0; head[c] != tail[c]; guard++) begin
          if (guard > int'(LEN / 8)) begin errs++; break; end  // tail outside the buffer
          if (u_mem.peek(base_of(c) + head[c]) != {8'h5A, 8'(c), 16'd0, 32'(got[c])}) errs++;
          got[c]++;
          head[c] = (head[c] + 8 == LEN) ? 0 : head[c] + 8;
        end
        wr(4 * c + 2, head[c]);
        if (got[c] < NW) all_got = 0;
      end
    end
    for (int c = 0; c < NUM_MEM_CH; c++) chk(got[c] == NW, $sformatf("channel %0d got %0d", c, got[c]));
    chk(errs == 0, $sformatf("%0d words wrong", errs));
    busy_ports = 0;
    for (int p = 0; p < NUM_AXI; p++) if (port_bursts[p] > 0) busy_ports++;
    chk(busy_ports == NUM_AXI, $sformatf("%0d AXI ports used", busy_ports));
    chk(isr[ISR_WRITE_DONE], "write-done bit set");
    wr(REG_MEM_ISR, 32'(1) << ISR_WRITE_DONE);
    @(negedge clk);
    chk(isr == 0, "status cleared by writing one");
    @(negedge clk) ev_overflow = 1; @(negedge clk) ev_overflow = 0;
    chk(isr == 32'(1) << ISR_OVERFLOW, "overflow bit");
    @(negedge clk) ev_button = 1; @(negedge clk) ev_button = 0;
    @(negedge clk) ev_clk_stable = 1; @(negedge clk) ev_clk_stable = 0;
    chk(isr[ISR_BUTTON1] && isr[ISR_CLK_STABLE], "button and clock-stable bits");
    wr(REG_MEM_ISR, 32'(1) << ISR_BUTTON1);
    chk(isr[ISR_OVERFLOW] && !isr[ISR_BUTTON1] && isr[ISR_CLK_STABLE], "clearing one bit leaves the others");
    chk(u_mem.proto_err == 0, "AXI protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
