// tb_xmem_decoder: self-checking test of the XMEM bus analysis module.
// The testbench plays AVR external-memory bus cycles as time-edge packets
// on the 19 lines (AD[7:0], A[15:8], RD_n, WR_n, ALE): the high address
// byte and the low byte on AD, an ALE pulse to latch it, then data on AD
// and a RD_n or WR_n strobe.  It keeps its own copy of the latched address
// and computes the packet due at every strobe.  Covered: random read and
// write cycles, and each of the four errors: RD_n and WR_n low together,
// ALE rising during a strobe, the high address changing during a strobe,
// and AD changing during a write strobe.
module tb_xmem_decoder;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [18:0] in_valid, in_ready;
  time_edge_t in_data [19];
  logic out_valid, out_ready = 1;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  xmem_decoder dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  time_edge_t q [19][$];
  logic [18:0] lvl = 19'h30000;     // RD_n = WR_n = 1
  logic [7:0] alo = 0;
  stime_t t = 10;
  logic [63:0] expq [$];

  always_comb for (int i = 0; i < 19; i++) begin
    in_valid[i] = q[i].size() != 0;
    in_data[i]  = in_valid[i] ? q[i][0] : '0;
  end
  always @(posedge clk) if (rst_n) for (int i = 0; i < 19; i++)
    if (in_valid[i] && in_ready[i]) void'(q[i].pop_front());
  always @(negedge clk) out_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0 || out_data != expq[0]) begin
      failures++;
      $display("FAIL: packet %h expected %h", out_data, expq.size() ? expq[0] : 64'h0);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  function automatic logic [3:0] errs(int l, logic [18:0] o, logic [18:0] n);
    logic [3:0] e = 0;
    e[3] = (l == 16 || l == 17) && !n[16] && !n[17];
    e[2] = (l == 16 || l == 17 || l == 18) && n[18] && (!n[16] || !n[17]);
    e[1] = l >= 8 && l < 16 && (!n[16] || !n[17]);
    e[0] = l < 8 && !n[17];
    return e;
  endfunction

  // change one line, predicting the packet it causes
  task automatic set_line(input int l, input logic v);
    if (lvl[l] != v) begin
      logic [18:0] o = lvl, n = lvl;
      logic [3:0] e;
      n[l] = v;
      e = errs(l, o, n);
      if (n[18]) alo = n[7:0];
      if (e != 0)
        expq.push_back({1'b0, t, e, 3'd0, !n[17], n[15:8], alo, n[7:0]});
      else if ((l == 16 || l == 17) && !v)
        expq.push_back({1'b1, t, 4'd0, 3'd0, l == 17, n[15:8], alo, n[7:0]});
      lvl = n;
      q[l].push_back('{time_: t, level: v});
    end
    t += 1;
  endtask
  task automatic set_bus(input int base, input logic [7:0] v);
    for (int i = 0; i < 8; i++) set_line(base + i, v[i]);
  endtask
  task automatic cycle(input logic wr, input logic [15:0] a, input logic [7:0] d);
    set_bus(8, a[15:8]);
    set_bus(0, a[7:0]);
    set_line(18, 1); set_line(18, 0);
    set_bus(0, d);
    set_line(wr ? 17 : 16, 0);
    set_line(wr ? 17 : 16, 1);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) cycle($urandom_range(0, 1), 16'($urandom()), 8'($urandom()));
    // RD and WR low together
    cycle(1, 16'h1234, 8'h56);
    set_line(17, 0); set_line(16, 0); set_line(16, 1); set_line(17, 1);
    // ALE during a read strobe
    set_line(16, 0); set_line(18, 1); set_line(18, 0); set_line(16, 1);
    // high address changes during a read strobe
    set_line(16, 0); set_line(9, !lvl[9]); set_line(16, 1);
    // data changes during a write strobe
    set_line(17, 0); set_line(3, !lvl[3]); set_line(17, 1);
    for (int k = 0; k < 5; k++) cycle($urandom_range(0, 1), 16'($urandom()), 8'($urandom()));
    begin
      bit empty_all;
      do begin
        @(negedge clk);
        empty_all = 1;
        for (int i = 0; i < 19; i++) if (q[i].size() != 0) empty_all = 0;
      end while (!empty_all);
    end
    repeat (20) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d packets missing", expq.size()));
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
