// tb_mem_channel: self-checking test of a memory channel.
// The channel is joined through an AXI master to a behavioural AXI
// memory.  Its circular buffer is 1 KB long and starts 128 bytes below a
// 4 KB boundary, so bursts must be split there and at the buffer end.  The
// testbench pushes 600 numbered words (with random gaps), and plays the
// driver: it reads the tail pointer, checks every word between its head
// and the tail in memory against the numbering, and writes the head back.
// Checks: all words arrive in order, the buffer never overruns unread data
// (the numbering would break), no AXI protocol error, bursts longer than
// one beat are used (up to 16), and write-done pulses come.
module tb_mem_channel;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_bus_t cfg = '0;
  logic in_valid = 0, in_ready, write_done;
  logic [63:0] in_data;
  logic [31:0] tail;
  axi_wr_req_t axi_req [1];
  axi_wr_rsp_t axi_rsp [1];
  int checks = 0, failures = 0;

  burst_if bus ();
  mem_channel #(.REG_BASE(8'd20)) dut (.clk, .rst_n, .cfg, .in_valid, .in_data,
    .in_ready, .bus(bus.master), .tail, .write_done);
  axi_master u_axi (.clk, .rst_n, .bus(bus.slave), .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]));
  axi_mem_model #(.N(1)) u_mem (.clk, .rst_n, .axi_req, .axi_rsp);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic wr(input int r, input logic [31:0] d);
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: 8'(r), data: d};
    @(negedge clk);
    cfg = '0;
  endtask

  localparam logic [31:0] BASE = 32'h0010_0F80, LEN = 32'h400;
  localparam int NW = 600;
  int sent = 0, got = 0, errs = 0, done_cnt = 0, max_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (write_done) done_cnt++;
    if (bus.req_valid && bus.req_ready && int'(bus.req_len) + 1 > max_len) max_len = int'(bus.req_len) + 1;
  end
  assign in_data = 64'hABCD_0000_0000_0000 | 64'(sent);
  always @(negedge clk) begin
    if (in_valid && !in_ready) ;                     // hold
    else begin
      in_valid <= sent < NW && $urandom_range(0, 4) != 0;
    end
  end

  initial begin
    logic [31:0] head = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(20, BASE);
    wr(21, LEN);
    wr(22, 0);
    while (got < NW) begin
      repeat ($urandom_range(20, 80)) @(negedge clk);
      for (int guard = 0; head != tail; guard++) begin
        logic [63:0] w;
        if (guard > int'(LEN / 8)) begin errs++; break; end  // tail outside the buffer
        w = u_mem.peek(BASE + head);
        if (w != (64'hABCD_0000_0000_0000 | 64'(got))) begin errs++; end
        got++;
        head = (head + 8 == LEN) ? 0 : head + 8;
      end
      wr(22, head);
    end
    chk(got == NW, "all words read");
    chk(errs == 0, $sformatf("%0d words wrong", errs));
    chk(u_mem.proto_err == 0, "AXI protocol");
    chk(max_len > 1 && max_len <= 16, $sformatf("longest burst %0d", max_len));
    chk(done_cnt == u_mem.bursts, "one write-done per burst");
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
