// tb_i2c_decoder: self-checking test of the I2C analysis module.
// The testbench draws I2C bus traffic as time-edge packets on SCL and SDA
// and computes the packets the decoder must produce: start, address
// (7-bit address, R/W, acknowledge, time of the first address bit), data
// (byte, acknowledge, time of its first bit), stop, and an error packet
// when a stop arrives in the middle of the address.  Covered: a write of
// two bytes, a read of one byte ending in NAK, a repeated start, a 4-bit
// data width set by the configuration register, and the error case.  The
// output is drained with a random ready.
module tb_i2c_decoder;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_bus_t cfg = '0;
  logic [1:0] in_valid, in_ready;
  time_edge_t in_data [2];
  logic out_valid, out_ready = 1;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  i2c_decoder dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  time_edge_t q [2][$];
  logic lvl [2] = '{1'b1, 1'b1};
  stime_t t = 10;
  logic [63:0] expq [$];
  int width = 8;

  always_comb for (int i = 0; i < 2; i++) begin
    in_valid[i] = q[i].size() != 0;
    in_data[i]  = in_valid[i] ? q[i][0] : '0;
  end
  always @(posedge clk) if (rst_n) for (int i = 0; i < 2; i++)
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

  function automatic logic [63:0] pk(int ty, stime_t tt, logic ack, logic rw, logic [23:0] d);
    return {3'(ty), tt, 4'd0, ack, rw, d};
  endfunction

  task automatic set_line(input int l, input logic v);
    if (lvl[l] != v) begin
      lvl[l] = v;
      q[l].push_back('{time_: t, level: v});
    end
    t += 1;
  endtask
  // one bit: SDA set while SCL low, then an SCL pulse; returns sample time
  task automatic bit_(input logic b, output stime_t ts);
    set_line(1, b);
    ts = t;
    set_line(0, 1'b1);
    set_line(0, 1'b0);
  endtask
  task automatic start_();
    set_line(1, 1'b1); set_line(0, 1'b1);
    expq.push_back(pk(1, t, 0, 0, 0));
    set_line(1, 1'b0);
    set_line(0, 1'b0);
  endtask
  task automatic stop_();
    set_line(1, 1'b0); set_line(0, 1'b1);
    expq.push_back(pk(2, t, 0, 0, 0));
    set_line(1, 1'b1);
  endtask
  task automatic address(input logic [6:0] a, input logic rw, input logic ack);
    stime_t t0, ts;
    for (int i = 6; i >= 0; i--) begin bit_(a[i], ts); if (i == 6) t0 = ts; end
    bit_(rw, ts);
    bit_(!ack, ts);
    expq.push_back(pk(3, t0, ack, rw, {17'd0, a}));
  endtask
  task automatic data(input logic [7:0] d, input logic ack, input logic rw);
    stime_t t0, ts;
    for (int i = width - 1; i >= 0; i--) begin bit_(d[i], ts); if (i == width - 1) t0 = ts; end
    bit_(!ack, ts);
    expq.push_back(pk(4, t0, ack, rw, 24'(d & 8'((1 << width) - 1))));
  endtask
  task automatic drain();
    wait (q[0].size() == 0 && q[1].size() == 0);
    repeat (20) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d packets missing", expq.size()));
    expq.delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // write two bytes
    start_(); address(7'h50, 0, 1); data(8'hA7, 1, 0); data(8'h3C, 1, 0); stop_();
    // read one byte, NAK
    start_(); address(7'h23, 1, 1); data(8'h96, 0, 1); stop_();
    // write then repeated start into a read
    start_(); address(7'h11, 0, 1); data(8'h01, 1, 0);
    start_(); address(7'h11, 1, 0); stop_();
    drain();
    // 4-bit data width
    @(negedge clk);
    cfg = '{valid: 1'b1, regnum: REG_I2C_BASE, data: 32'd4};
    @(negedge clk);
    cfg = '0;
    width = 4;
    start_(); address(7'h7F, 0, 1); data(8'h0D, 1, 0); data(8'h06, 0, 0); stop_();
    drain();
    // error: stop after three address bits
    begin
      stime_t ts;
      start_();
      bit_(1, ts); bit_(0, ts); bit_(1, ts);
      set_line(1, 1'b0); set_line(0, 1'b1);
      expq.push_back(pk(7, t, 0, 0, 24'h5));   // same time: address/data FIFO first
      expq.push_back(pk(2, t, 0, 0, 0));
      set_line(1, 1'b1);
    end
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
