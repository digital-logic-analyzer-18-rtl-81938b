// sampling_channel: one of the 32 identical sampling channels.
//
// The probe input goes through a two-register synchronizer; each synced
// sample is compared with the previous one, and a difference is an edge.
// An edge is turned into a time-edge packet {sample number[30:0], level}.
// The channel follows four states: RESET, PRETRIG, SAMPLING and WAIT.
//  * PRETRIG: while the channel is running, edges go into the pretrigger
//    FIFO.  The oldest entry is dropped when the FIFO is full and a new edge
//    arrives, or when it is older than max_age samples.  A dropped edge
//    becomes the known initial level of the line.
//  * SAMPLING (entered on trigger): the channel first outputs the initial
//    value packet {time since which the level is known, level}, then drains
//    the pretrigger FIFO, then the post-trigger FIFO, which receives the edges
//    seen after the trigger.  Sampling stops max_num samples after the
//    trigger.
//  * WAIT: no more capture; once every buffer is empty the channel pulses
//    done, clears its sample counter and returns to PRETRIG.
// Output is a valid/ready handshake, at most one packet per clock.  To keep
// all channels in time order the head packet is only offered while its time
// is not after release_time, the earliest head time over all channels,
// which the sampler computes from head_valid/head_time.
// The synchronizer, edge detect, the two FIFOs, the state diagram, the
// per-channel sample counter and trigger-time register follow the design;
// FIFO depth, the form of the initial-value packet and the release-time
// ordering scheme are this design's choices.  Clock: the sample clock.
module sampling_channel
  import dla_pkg::*;
#(
  parameter int PRE_DEPTH  = 16,   // pretrigger FIFO depth
  parameter int POST_DEPTH = 16    // post-trigger FIFO depth
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din,          // probe input (asynchronous)
  input  logic       running,      // channel enabled for this run
  input  logic       trigger,      // trigger pulse from the trigger module
  input  stime_t     max_age,      // maximum pretrigger age in samples
  input  stime_t     max_num,      // samples to take after the trigger
  input  stime_t     release_time, // earliest head time over all channels
  output logic       d_cur,        // synced sample (to the trigger)
  output logic       d_prev,       // previous synced sample
  output logic       head_valid,
  output stime_t     head_time,
  output logic       out_valid,
  output time_edge_t out_data,
  input  logic       out_ready,
  output logic       done,         // pulse: run finished, buffers empty
  output logic       overflow      // pulse: post-trigger edge lost
);
  typedef enum logic [1:0] {S_RESET, S_PRETRIG, S_SAMPLING, S_WAIT} state_t;
  state_t state;

  logic d_meta;
  stime_t count, age_trig;
  logic init_pending, init_level;
  stime_t init_time;

  // synchronizer and edge detect
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_meta <= 1'b0; d_cur <= 1'b0; d_prev <= 1'b0;
    end else begin
      d_meta <= din; d_cur <= d_meta; d_prev <= d_cur;
    end
  end
  logic is_edge;
  assign is_edge = d_cur != d_prev;
  time_edge_t new_te;
  assign new_te = '{time_: count, level: d_cur};

  // FIFOs
  time_edge_t a_head, b_head;
  logic a_full, a_empty, b_full, b_empty;
  logic a_wr, a_rd, b_wr, b_rd, a_clr;
  sync_fifo #(.WIDTH(32), .DEPTH(PRE_DEPTH)) u_pre (
    .clk, .rst_n, .clr(a_clr), .wr(a_wr), .wdata(new_te), .rd(a_rd),
    .rdata(a_head), .full(a_full), .empty(a_empty), .count());
  sync_fifo #(.WIDTH(32), .DEPTH(POST_DEPTH)) u_post (
    .clk, .rst_n, .clr(1'b0), .wr(b_wr), .wdata(new_te), .rd(b_rd),
    .rdata(b_head), .full(b_full), .empty(b_empty), .count());

  logic capturing, aged, drop_full, pop_out;
  assign capturing = state == S_PRETRIG && running;
  assign aged      = capturing && !a_empty && (count - a_head.time_) > max_age;
  assign drop_full = capturing && a_full && is_edge;

  // output head selection: initial value, then pretrigger, then post-trigger
  logic outputting;
  assign outputting = state == S_SAMPLING || state == S_WAIT;
  always_comb begin
    head_valid = outputting && (init_pending || !a_empty || !b_empty);
    if (init_pending)  out_data = '{time_: init_time, level: init_level};
    else if (!a_empty) out_data = a_head;
    else               out_data = b_head;
    head_time = out_data.time_;
  end
  assign out_valid = head_valid && head_time <= release_time;
  assign pop_out   = out_valid && out_ready;

  assign a_wr  = capturing && is_edge;
  assign a_rd  = aged || drop_full || (pop_out && !init_pending);
  assign a_clr = state == S_PRETRIG && !running;
  assign b_wr  = state == S_SAMPLING && is_edge;
  assign b_rd  = pop_out && !init_pending && a_empty;
  assign overflow = b_wr && b_full;

  logic all_empty;
  assign all_empty = !init_pending && a_empty && b_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_RESET;
      count <= '0;
      age_trig <= '0;
      init_pending <= 1'b0;
      init_level <= 1'b0;
      init_time <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_RESET: state <= S_PRETRIG;
        S_PRETRIG: begin
          if (!running) begin
            count <= '0;
            init_level <= d_cur;
            init_time <= '0;
          end else begin
            count <= count + 1'b1;
            if (aged || drop_full) begin
              init_level <= a_head.level;
              init_time <= a_head.time_;
            end
            if (trigger) begin
              age_trig <= count;
              init_pending <= 1'b1;
              state <= S_SAMPLING;
            end
          end
        end
        S_SAMPLING: begin
          count <= count + 1'b1;
          if (count - age_trig >= max_num) state <= S_WAIT;
        end
        default: begin // S_WAIT
          count <= count + 1'b1;
          if (all_empty) begin
            state <= S_PRETRIG;
            count <= '0;
            done <= 1'b1;
          end
        end
      endcase
      if (pop_out && init_pending) init_pending <= 1'b0;
    end
  end

  // a packet offered must stay until taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && state != S_PRETRIG |=> head_valid);

endmodule
