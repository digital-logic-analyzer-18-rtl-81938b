// rst_sync: reset synchronizer.  The output reset (active low) is asserted
// immediately when the input reset is asserted and released two clock
// edges after the input is released, synchronously to clk.  Used to let
// the interface-clock side of a clock-crossing FIFO follow the reset of
// the sample-clock side.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic r1;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin r1 <= 1'b0; rst_n <= 1'b0; end
    else begin r1 <= 1'b1; rst_n <= r1; end
  end
endmodule
