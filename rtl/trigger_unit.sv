// trigger_unit: trigger logic of the sampler.
//
// Eight trigger groups, each made of three 32-bit registers: an enable mask
// and a value-high / value-low pair.  The value pair gives every channel a
// 2-bit value, which is compared with the channel's last two synced samples:
// value-high with the previous sample and value-low with the current one.
// So {0,1} asks for a rising edge, {1,0} for a falling edge, {1,1} or {0,0}
// for a steady level.  A group matches when it has at least one enabled
// channel and every enabled channel matches.  The trigger fires in the same
// cycle as any group match (or the manual trigger) while the sampler is
// armed.  Purely combinational; the registers live in the sampler.
// The group structure and same-cycle behaviour follow the design; the
// meaning given to the value-high/value-low pair is this design's reading.
module trigger_unit
  import dla_pkg::*;
#(
  parameter int NCH     = 32,
  parameter int NGROUPS = 8
) (
  input  logic [NCH-1:0] d_cur,
  input  logic [NCH-1:0] d_prev,
  input  logic [NCH-1:0] val_hi [NGROUPS],
  input  logic [NCH-1:0] val_lo [NGROUPS],
  input  logic [NCH-1:0] en     [NGROUPS],
  input  logic           armed,
  input  logic           man_trig,
  output logic [NGROUPS-1:0] group_match,
  output logic           trigger
);
  always_comb begin
    for (int g = 0; g < NGROUPS; g++) begin
      group_match[g] = (en[g] != '0) &&
        ((en[g] & ((val_hi[g] ^ d_prev) | (val_lo[g] ^ d_cur))) == '0);
    end
    trigger = armed && (man_trig || (group_match != '0));
  end
endmodule
