// agg_andor: AND-OR array of request aggregation.
//
// After the bank arbiters have granted the leaders' requests, every access
// whose leader was granted is granted too: gnt_out[i] = valid[i] AND
// gnt_in[leader[i]], OR-ed over the possible leaders.  A leader is its own
// leader.  Purely combinational; placed after the arbiters as in the
// design description.
module agg_andor #(
  parameter int unsigned N     = rf_pkg::MST_NREAD + rf_pkg::MST_NWRITE,
  localparam int unsigned LI_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]            valid,
  input  logic [N-1:0][LI_W-1:0]  leader,
  input  logic [N-1:0]            gnt_in,
  output logic [N-1:0]            gnt_out
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      gnt_out[i] = 1'b0;
      for (int j = 0; j < N; j++)
        gnt_out[i] |= valid[i] && (32'(leader[i]) == j) && gnt_in[j];
    end
  end
endmodule
