// tb_cpu_interface: self-checking test of the processor-side register port.
// The testbench is an AXI-lite style master.  It writes registers with the
// address and data phases in either order and with delays, reads back the
// tail pointers and the interrupt status register, and watches the
// configuration bus.  Checks: each write gives exactly one configuration
// pulse with register number = byte address / 4 and the written data, and
// one write response; reads return the tail of the addressed channel, the
// status register, or zero for other registers; the interrupt line follows
// the status register.
module tb_cpu_interface;
  import dla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] s_awaddr = 0, s_wdata = 0, s_araddr = 0, s_rdata;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0, irq;
  logic [1:0] s_bresp, s_rresp;
  cfg_bus_t cfg;
  logic [31:0] tail [NUM_MEM_CH], isr = 0;
  int checks = 0, failures = 0;

  cpu_interface dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  int pulses = 0;
  cfg_bus_t last_cfg;
  always @(posedge clk) if (cfg.valid) begin pulses++; last_cfg <= cfg; end

  task automatic write(input logic [31:0] a, input logic [31:0] d, input int order);
    fork
      begin
        if (order == 1) repeat (3) @(negedge clk);
        s_awaddr = a; s_awvalid = 1;
        do @(posedge clk); while (!s_awready);
        @(negedge clk) s_awvalid = 0;
      end
      begin
        if (order == 0) repeat (3) @(negedge clk);
        s_wdata = d; s_wvalid = 1;
        do @(posedge clk); while (!s_wready);
        @(negedge clk) s_wvalid = 0;
      end
    join
    repeat ($urandom_range(0, 3)) @(negedge clk);
    s_bready = 1;
    do @(posedge clk); while (!s_bvalid);
    @(negedge clk) s_bready = 0;
  endtask
  task automatic read(input logic [31:0] a, output logic [31:0] d);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk) s_arvalid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    s_rready = 1;
    do @(posedge clk); while (!s_rvalid);
    d = s_rdata;
    @(negedge clk) s_rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    for (int c = 0; c < NUM_MEM_CH; c++) tail[c] = 32'h1000 + 32'(c) * 8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      logic [31:0] a, v;
      int n_before;
      a = 32'($urandom_range(0, 255)) << 2;
      v = $urandom;
      n_before = pulses;
      write(a, v, i % 3);
      repeat (2) @(negedge clk);
      chk(pulses == n_before + 1 && last_cfg.regnum == a[9:2] && last_cfg.data == v,
          $sformatf("write %0d: reg %0d data %h", i, a[9:2], v));
    end
    for (int c = 0; c < NUM_MEM_CH; c++) begin
      read(32'(4 * (4 * c + 3)), d);
      chk(d == tail[c], $sformatf("tail of channel %0d", c));
    end
    read(32'(4 * 5), d);
    chk(d == 0, "non-readable register reads zero");
    chk(!irq, "no interrupt while status is clear");
    isr = 32'h0001_4000;
    read(32'(4 * REG_MEM_ISR), d);
    chk(d == 32'h0001_4000, "status register read");
    chk(irq, "interrupt raised by status");
    chk(s_bresp == 2'b00 && s_rresp == 2'b00, "OKAY responses");
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
