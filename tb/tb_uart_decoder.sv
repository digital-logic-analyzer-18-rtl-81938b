// tb_uart_decoder: self-checking test of the UART analysis module.
// The testbench draws UART frames on the receive line as time-edge
// packets: a low start bit, data bits least significant first, optional
// even parity and one or two high stop bits, each bit one period long, and
// works out the expected packet for each frame.  Covered: 8N1 at 16 ticks
// per bit, 7 bits with parity and two stop bits at 10 ticks, 5-bit frames
// at 7 ticks (odd period), a frame with a wrong parity bit and a frame
// whose stop bit is low (framing error).  A frame is reported once a later
// edge arrives, so each group ends with an extra edge.
module tb_uart_decoder;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_bus_t cfg = '0;
  logic in_valid, in_ready;
  time_edge_t in_data;
  logic out_valid, out_ready = 1;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  uart_decoder dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  time_edge_t q [$];
  logic lvl = 1'b1;
  stime_t t = 50;
  logic [63:0] expq [$];

  assign in_valid = q.size() != 0;
  assign in_data  = in_valid ? q[0] : '0;
  always @(posedge clk) if (rst_n && in_valid && in_ready) void'(q.pop_front());
  always @(negedge clk) out_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0 || out_data != expq[0]) begin
      failures++;
      $display("FAIL: packet %h expected %h", out_data, expq.size() ? expq[0] : 64'h0);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  // hold the line at v for n ticks
  task automatic hold(input logic v, input int n);
    if (lvl != v) begin lvl = v; q.push_back('{time_: t, level: v}); end
    t += stime_t'(n);
  endtask

  task automatic frame(input int nb, input int p, input logic par_en, input logic two,
                       input logic [7:0] d, input logic bad_par, input logic bad_stop);
    stime_t t0 = t;
    logic par = 0;
    hold(0, p);
    for (int i = 0; i < nb; i++) begin hold(d[i], p); par ^= d[i]; end
    if (par_en) hold(par ^ bad_par, p);
    hold(!bad_stop, p);
    if (two) hold(1, p);
    hold(1, 3 * p);       // idle
    expq.push_back({!(bad_par || bad_stop), t0, 22'd0, bad_par, bad_stop,
                    d & 8'((1 << nb) - 1)});
  endtask

  task automatic configure(input int p, input logic par_en, input logic two, input int nb);
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: REG_UART_BASE, data: {11'd0, 3'(nb - 1), two, par_en, 16'(p)}};
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic finish_group();
    hold(0, 2); hold(1, 40);        // a short glitch: later edge, no frame
    wait (q.size() == 0);
    repeat (20) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d packets missing", expq.size()));
    expq.delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    configure(16, 0, 0, 8);
    for (int k = 0; k < 6; k++) frame(8, 16, 0, 0, 8'($urandom()), 0, 0);
    finish_group();
    configure(10, 1, 1, 7);
    for (int k = 0; k < 6; k++) frame(7, 10, 1, 1, 8'($urandom()), 0, 0);
    frame(7, 10, 1, 1, 8'h55, 1, 0);     // parity error
    frame(7, 10, 1, 1, 8'h12, 0, 0);
    finish_group();
    configure(7, 0, 0, 5);
    for (int k = 0; k < 6; k++) frame(5, 7, 0, 0, 8'($urandom()), 0, 0);
    frame(5, 7, 0, 0, 8'h0A, 0, 1);      // framing error
    hold(1, 20);
    frame(5, 7, 0, 0, 8'h1F, 0, 0);
    finish_group();
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
