// burst_switch: BurstSwitch, merges two BurstIf buses onto one.
//
// When idle it grants whichever input has a request pending, alternating
// when both do, and then connects that input to the output for the whole
// transaction (request, data beats and done).  It holds the grant until
// done, so the single outstanding transaction of BurstIf is kept.
// The alternating choice on a tie is this design's choice.
module burst_switch (
  input  logic    clk,
  input  logic    rst_n,
  burst_if.slave  s0,
  burst_if.slave  s1,
  burst_if.master m
);
  logic busy, sel, last;
  logic pick;
  assign pick = s0.req_valid && s1.req_valid ? !last : s1.req_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; sel <= 1'b0; last <= 1'b1;
    end else if (!busy) begin
      if (s0.req_valid || s1.req_valid) begin
        busy <= 1'b1; sel <= pick; last <= pick;
      end
    end else if (m.done) begin
      busy <= 1'b0;
    end
  end

  always_comb begin
    m.req_valid = busy && (sel ? s1.req_valid : s0.req_valid);
    m.req_addr  = sel ? s1.req_addr : s0.req_addr;
    m.req_len   = sel ? s1.req_len  : s0.req_len;
    m.wvalid    = busy && (sel ? s1.wvalid : s0.wvalid);
    m.wdata     = sel ? s1.wdata : s0.wdata;
    m.wlast     = sel ? s1.wlast : s0.wlast;
    s0.req_ready = busy && !sel && m.req_ready;
    s1.req_ready = busy &&  sel && m.req_ready;
    s0.wready    = busy && !sel && m.wready;
    s1.wready    = busy &&  sel && m.wready;
    s0.done      = busy && !sel && m.done;
    s1.done      = busy &&  sel && m.done;
  end
endmodule
