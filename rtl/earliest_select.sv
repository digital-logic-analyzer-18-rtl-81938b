// earliest_select: picks, among N valid/ready time-edge inputs, the valid
// one with the earliest sample time (lowest index on a tie).  The protocol
// decoders use it to pull in their input lines in time order: because the
// sampler hands out samples in time order, no later sample can be older.
// take pops the selected input (its ready is raised, combinationally).
module earliest_select
  import dla_pkg::*;
#(
  parameter int N = 2
) (
  input  logic [N-1:0] in_valid,
  input  time_edge_t   in_data [N],
  output logic [N-1:0] in_ready,
  input  logic         take,
  output logic         sel_valid,
  output logic [$clog2(N+1)-1:0] sel_idx,
  output time_edge_t   sel_data
);
  always_comb begin
    sel_valid = 1'b0;
    sel_idx   = '0;
    sel_data  = in_data[0];
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && (!sel_valid || in_data[i].time_ < sel_data.time_)) begin
        sel_valid = 1'b1;
        sel_idx   = ($clog2(N+1))'(i);
        sel_data  = in_data[i];
      end
    end
    in_ready = '0;
    if (take && sel_valid) in_ready[sel_idx] = 1'b1;
  end
endmodule
