// sampler: the sampling module.
//
// Holds the sampler's control registers, the trigger module and the 32
// sampling channels, all in the sample clock domain.  Configuration writes
// arrive on the configuration bus in the interface clock domain; the ones
// addressed to the sampler (register numbers 96..127) cross into the sample
// domain through an asynchronous FIFO and are loaded there:
//   offset 0-7  value mask high, group n      offset 24 trigger control
//   offset 8-15 value mask low,  group n      offset 25 max sample number
//   offset 16-23 enable mask,    group n      offset 26 max pretrigger age
//                                             offset 27 channel enable mask
// Trigger control bit 0 arms a run (every enabled channel becomes running),
// bit 1 is the manual trigger.  After arming, the first trigger (group match
// or manual) starts sampling on all running channels at once; a channel
// stops running when it has finished and drained.  The sampler also
// computes the release time, the earliest head time over all channels, so
// that the channels hand out their packets in time order.  Outputs are one
// valid/ready time-edge stream per channel, in the sample clock domain.
// Register set and split into channel/trigger/status follow the design; the
// bit meanings of trigger control and the register reset values are this
// design's choices.
module sampler
  import dla_pkg::*;
#(
  parameter int NCH        = 32,
  parameter int PRE_DEPTH  = 16,
  parameter int POST_DEPTH = 16
) (
  input  logic       clk,          // interface clock (configuration bus)
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  input  logic       sclk,         // sample clock
  input  logic       srst_n,       // sample-domain reset
  input  logic [NCH-1:0] probe,
  output logic [NCH-1:0] out_valid,
  output time_edge_t     out_data [NCH],
  input  logic [NCH-1:0] out_ready,
  output logic [NCH-1:0] running,
  output logic       triggered,
  output logic       edge_lost     // sticky: a post-trigger FIFO overflowed
);
  // ---------------- configuration crossing ----------------
  logic cf_empty, cf_full;
  logic [39:0] cf_q;
  logic cf_wr;
  assign cf_wr = cfg.valid && cfg.regnum >= REG_SAMPLER_BASE &&
                 cfg.regnum < REG_SAMPLER_BASE + 8'd32;
  // the write side is reset together with the sample domain
  logic cf_wrst_n;
  rst_sync u_cf_rst (.clk, .arst_n(rst_n && srst_n), .rst_n(cf_wrst_n));
  async_fifo #(.WIDTH(40), .DEPTH(16)) u_cfg_fifo (
    .wclk(clk), .wrst_n(cf_wrst_n), .wr(cf_wr), .wdata({cfg.regnum, cfg.data}),
    .full(cf_full),
    .rclk(sclk), .rrst_n(srst_n), .rd(!cf_empty), .rdata(cf_q), .empty(cf_empty));

  // ---------------- registers (sample domain) ----------------
  logic [NCH-1:0] val_hi [NUM_GROUPS];
  logic [NCH-1:0] val_lo [NUM_GROUPS];
  logic [NCH-1:0] en_mask[NUM_GROUPS];
  stime_t max_num, max_age;
  logic [NCH-1:0] chan_en;
  logic man_trig, arm;
  logic [4:0] roff;
  assign roff = 5'(cf_q[39:32] - REG_SAMPLER_BASE);

  logic trig;
  logic [NCH-1:0] done, d_cur, d_prev, ovf;

  always_ff @(posedge sclk) begin
    if (!srst_n) begin
      for (int g = 0; g < NUM_GROUPS; g++) begin
        val_hi[g] <= '0; val_lo[g] <= '0; en_mask[g] <= '0;
      end
      max_num <= 31'd1024;
      max_age <= 31'd1024;
      chan_en <= '0;
      man_trig <= 1'b0;
      arm <= 1'b0;
    end else begin
      man_trig <= 1'b0;
      arm <= 1'b0;
      if (!cf_empty) begin
        if (roff < 5'(SREG_VAL_LO))       val_hi[roff[2:0]]  <= cf_q[NCH-1:0];
        else if (roff < 5'(SREG_EN))      val_lo[roff[2:0]]  <= cf_q[NCH-1:0];
        else if (roff < 5'(SREG_TRIG_CTL)) en_mask[roff[2:0]] <= cf_q[NCH-1:0];
        else case (int'(roff))
          SREG_TRIG_CTL: begin arm <= cf_q[0]; man_trig <= cf_q[1]; end
          SREG_MAX_NUM:  max_num <= cf_q[30:0];
          SREG_MAX_AGE:  max_age <= cf_q[30:0];
          SREG_CHAN_EN:  chan_en <= cf_q[NCH-1:0];
          default: ;
        endcase
      end
    end
  end

  // running / triggered status
  always_ff @(posedge sclk) begin
    if (!srst_n) begin
      running <= '0;
      triggered <= 1'b0;
      edge_lost <= 1'b0;
    end else begin
      if (arm) begin
        running <= chan_en;
        triggered <= 1'b0;
      end else begin
        running <= running & ~done;
        if (trig) triggered <= 1'b1;
      end
      if (ovf != '0) edge_lost <= 1'b1;
    end
  end

  // ---------------- trigger ----------------
  trigger_unit #(.NCH(NCH), .NGROUPS(NUM_GROUPS)) u_trig (
    .d_cur, .d_prev, .val_hi, .val_lo, .en(en_mask),
    .armed(running != '0 && !triggered && !arm), .man_trig,
    .group_match(), .trigger(trig));

  // ---------------- channels ----------------
  logic [NCH-1:0] head_valid;
  stime_t head_time [NCH];
  stime_t release_time;

  always_comb begin
    release_time = '1;
    for (int i = 0; i < NCH; i++)
      if (head_valid[i] && head_time[i] < release_time) release_time = head_time[i];
  end

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    sampling_channel #(.PRE_DEPTH(PRE_DEPTH), .POST_DEPTH(POST_DEPTH)) u_ch (
      .clk(sclk), .rst_n(srst_n), .din(probe[i]), .running(running[i]),
      .trigger(trig), .max_age, .max_num, .release_time,
      .d_cur(d_cur[i]), .d_prev(d_prev[i]),
      .head_valid(head_valid[i]), .head_time(head_time[i]),
      .out_valid(out_valid[i]), .out_data(out_data[i]), .out_ready(out_ready[i]),
      .done(done[i]), .overflow(ovf[i]));
  end

endmodule
