// tb_spi_decoder: self-checking test of the SPI analysis module.
// The testbench draws SPI waveforms as time-edge packets on the four lines
// (SCLK, MOSI, MISO, SS) and works out the expected output packets from the
// words it sent: {1, time of the first sampling edge, MOSI word} followed by
// {1, time of the last sampling edge, MISO word}, least significant bit
// first.  Covered: all four CPOL/CPHA modes in four-wire mode with 8, 16
// and 32-bit words, half-duplex three-wire (MISO word reads 0), three-wire
// without slave select, and an error packet when SS rises mid-word.
module tb_spi_decoder;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_bus_t cfg = '0;
  logic [3:0] in_valid, in_ready;
  time_edge_t in_data [4];
  logic out_valid, out_ready = 1;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  spi_decoder dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  time_edge_t q [4][$];
  logic lvl [4] = '{1'b0, 1'b0, 1'b0, 1'b1};
  stime_t t = 10;
  logic [63:0] expq [$];

  always_comb for (int i = 0; i < 4; i++) begin
    in_valid[i] = q[i].size() != 0;
    in_data[i]  = in_valid[i] ? q[i][0] : '0;
  end
  always @(posedge clk) if (rst_n) for (int i = 0; i < 4; i++)
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

  task automatic set_line(input int l, input logic v);
    if (lvl[l] != v) begin
      lvl[l] = v;
      q[l].push_back('{time_: t, level: v});
    end
    t += 1;
  endtask

  task automatic configure(input logic [8:0] c);
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: REG_SPI_BASE, data: {23'd0, c}};
    @(negedge clk);
    cfg = '0;
  endtask

  // one word; returns nothing, pushes expected packets
  task automatic word(input int n, input logic cpol, input logic cpha,
                      input logic [31:0] mo, input logic [31:0] mi,
                      input logic miso_used, input logic use_ss);
    stime_t tf, tl;
    if (use_ss) set_line(3, 1'b0);
    for (int i = 0; i < n; i++) begin
      if (!cpha) begin
        set_line(1, mo[i]); set_line(2, mi[i]);
        set_line(0, !cpol);                 // leading edge: sample
        if (i == 0) tf = t - 1;
        tl = t - 1;
        set_line(0, cpol);
      end else begin
        set_line(0, !cpol);                 // leading edge: shift
        set_line(1, mo[i]); set_line(2, mi[i]);
        set_line(0, cpol);                  // trailing edge: sample
        if (i == 0) tf = t - 1;
        tl = t - 1;
      end
    end
    if (use_ss) set_line(3, 1'b1);
    expq.push_back({1'b1, tf, n == 32 ? mo : mo & ((32'd1 << n) - 1)});
    expq.push_back({1'b1, tl, miso_used ? (n == 32 ? mi : mi & ((32'd1 << n) - 1)) : 32'd0});
  endtask

  task automatic drain();
    wait (q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0 && q[3].size() == 0);
    repeat (20) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d packets missing", expq.size()));
    expq.delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // four-wire, all modes
    for (int m = 0; m < 4; m++) begin
      logic cpol = m[1], cpha = m[0];
      configure({1'b1, 1'b0, cpol, cpha, 5'd8});
      set_line(0, cpol);                   // idle level while deselected
      for (int k = 0; k < 4; k++) word(8, cpol, cpha, $urandom(), $urandom(), 1, 1);
      drain();
    end
    configure({1'b1, 1'b0, 1'b1, 1'b1, 5'd16});
    for (int k = 0; k < 3; k++) word(16, 1, 1, $urandom(), $urandom(), 1, 1);
    drain();
    configure({1'b1, 1'b0, 1'b1, 1'b1, 5'd0}); // 32-bit words
    for (int k = 0; k < 3; k++) word(32, 1, 1, $urandom(), $urandom(), 1, 1);
    drain();
    // half-duplex three-wire, mode 0
    configure({1'b0, 1'b0, 1'b1, 1'b1, 5'd8});
    set_line(0, 1'b1);
    configure({1'b0, 1'b0, 1'b0, 1'b0, 5'd8});
    set_line(0, 1'b0);
    for (int k = 0; k < 3; k++) word(8, 0, 0, $urandom(), $urandom(), 0, 1);
    drain();
    // three-wire without slave select (SS held high, ignored)
    configure({1'b0, 1'b1, 1'b0, 1'b0, 5'd8});
    for (int k = 0; k < 3; k++) word(8, 0, 0, $urandom(), $urandom(), 0, 0);
    drain();
    // error: SS rises after 3 bits of an 8-bit word, four-wire mode 0
    configure({1'b1, 1'b0, 1'b0, 1'b0, 5'd8});
    begin
      logic [31:0] part = 0;
      set_line(3, 1'b0);
      for (int i = 0; i < 3; i++) begin
        logic b = 1'($urandom());
        part[i] = b;
        set_line(1, b); set_line(0, 1'b1); set_line(0, 1'b0);
      end
      expq.push_back({1'b0, t, part});
      set_line(3, 1'b1);
    end
    word(8, 0, 0, 32'hA5, 32'h3C, 1, 1);   // next word decodes normally
    drain();
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
