// tb_sample_to_mem: self-checking test of the sampler-to-memory merge.
// Four sampling-interface streams (NCH=4 here, 32 in the design) push
// time-edge packets with rising times and random gaps; the output is
// drained with a random ready.  Checks: every packet comes out exactly
// once with the right channel number, output times never go backwards
// (the packet taken is never newer than any other waiting head), and a channel
// whose buffer is full is back-pressured instead of losing packets.
module tb_sample_to_mem;
  import dla_pkg::*;
  localparam int NCH = 4, NPK = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NCH-1:0] in_valid = '0, in_ready;
  time_edge_t in_data [NCH];
  logic out_valid, out_ready = 0;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  sample_to_mem #(.NCH(NCH)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_ready);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  int sent [NCH], got [NCH];
  int stalls = 0, order_err = 0, bad = 0, total = 0;
  logic [30:0] t_now = 31'd5;
  // each channel sends packets stamped with a shared rising clock, so
  // packets from different channels interleave in time
  always @(posedge clk) if (rst_n) begin
    t_now <= t_now + 31'd1;
    for (int c = 0; c < NCH; c++) begin
      if (in_valid[c] && !in_ready[c]) stalls++;
      if (in_valid[c] && in_ready[c]) sent[c] <= sent[c] + 1;
    end
    if (out_valid && out_ready) begin
      int c;
      c = int'(out_data[36:32]);
      for (int k = 0; k < NCH; k++)
        if (!dut.empty[k] && dut.q[k].time_ < out_data[31:1]) order_err++;
      if (c >= NCH || out_data[0] != got[c][0] || out_data[63:37] != 0) bad++;
      else got[c]++;
      total++;
    end
  end
  always @(negedge clk) begin
    out_ready <= $urandom_range(0, 3) != 0;
    for (int c = 0; c < NCH; c++)
      if (!(in_valid[c] && !in_ready[c])) begin
        in_valid[c] <= sent[c] < NPK && $urandom_range(0, 2) == 0;
        in_data[c]  <= '{time_: t_now, level: sent[c][0]};
      end
  end
  // the handshake happens at the next edge, when sent[] has not moved yet,
  // so the level stays tied to the packet index
  initial begin
    for (int c = 0; c < NCH; c++) begin sent[c] = 0; got[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (total == NCH * NPK);
    repeat (20) @(negedge clk);
    for (int c = 0; c < NCH; c++) chk(got[c] == NPK, $sformatf("channel %0d got %0d", c, got[c]));
    chk(total == NCH * NPK, "no extra packets");
    chk(bad == 0, $sformatf("%0d bad packets", bad));
    chk(order_err == 0, $sformatf("%0d out of order", order_err));
    chk(stalls > 0, "back-pressure seen");
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
