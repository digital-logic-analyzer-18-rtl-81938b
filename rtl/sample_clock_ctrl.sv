// sample_clock_ctrl: controls the reconfigurable sample clock.
//
// The sample clock comes from a clock manager (MMCM) outside this module.
// A write to the sample clock configuration register (register 250) gives
// half of the multiplier in bits [5:0] and half of the divider in bits
// [11:6]; the full values (2x each) are driven to the clock manager with a
// one-cycle reconfig request.  From then on the sampler is held in reset
// until the clock manager reports lock again: the FSM waits for locked to
// drop (or a timeout), then for it to rise, and then pulses clk_stable,
// which becomes the "sample clock stable" interrupt.  The sampler reset is
// asserted asynchronously and released synchronously to the sample clock
// by a two-flop reset synchronizer.
// The register layout, the held reset and the stable interrupt follow the
// design; the handshake with the clock manager (request pulse, locked) and
// the reset values (x10 / /10 halves 5 and 5) are this design's choices.
// Clock: the interface clock, except the reset synchronizer on sclk.
module sample_clock_ctrl
  import dla_pkg::*;
#(
  parameter int UNLOCK_TIMEOUT = 64   // cycles to wait for locked to drop
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_bus_t   cfg,
  output logic [6:0] mmcm_mult,
  output logic [6:0] mmcm_div,
  output logic       mmcm_reconfig,
  input  logic       mmcm_locked,    // asynchronous
  input  logic       sclk,
  output logic       srst_n,         // sample-domain reset, active low
  output logic       clk_stable      // pulse (clk domain)
);
  typedef enum logic [1:0] {C_STABLE, C_UNLOCK, C_LOCK} cstate_t;
  cstate_t state;
  logic lk_meta, lk;
  logic [$clog2(UNLOCK_TIMEOUT+1)-1:0] tmo;

  always_ff @(posedge clk) begin
    if (!rst_n) begin lk_meta <= 1'b0; lk <= 1'b0; end
    else begin lk_meta <= mmcm_locked; lk <= lk_meta; end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= C_LOCK;          // wait for the first lock after reset
      mmcm_mult <= 7'd10;
      mmcm_div <= 7'd10;
      mmcm_reconfig <= 1'b0;
      clk_stable <= 1'b0;
      tmo <= '0;
    end else begin
      mmcm_reconfig <= 1'b0;
      clk_stable <= 1'b0;
      if (cfg.valid && cfg.regnum == REG_SCLK_CFG) begin
        mmcm_mult <= {cfg.data[5:0], 1'b0};
        mmcm_div  <= {cfg.data[11:6], 1'b0};
        mmcm_reconfig <= 1'b1;
        tmo <= '0;
        state <= C_UNLOCK;
      end else begin
        case (state)
          C_UNLOCK: begin
            tmo <= tmo + 1'b1;
            if (!lk || int'(tmo) == UNLOCK_TIMEOUT) state <= C_LOCK;
          end
          C_LOCK: if (lk) begin
            state <= C_STABLE;
            clk_stable <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // reset synchronizer into the sample clock domain
  logic hold_n, r1;
  assign hold_n = rst_n && state == C_STABLE;
  always_ff @(posedge sclk or negedge hold_n) begin
    if (!hold_n) begin r1 <= 1'b0; srst_n <= 1'b0; end
    else begin r1 <= 1'b1; srst_n <= r1; end
  end
endmodule
