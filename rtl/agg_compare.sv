// agg_compare: comparator array for request aggregation.
//
// Accesses that arrive in the same cycle and name the same register are
// aggregated: only the highest-priority one (its "leader") requests the
// bank, and the others share its grant.  The array compares every pair of
// valid accesses; access i's leader is the lowest index j <= i with a
// matching register number.  Ports are ordered by priority, write ports
// first, so a write always leads the reads of the same register and the
// reads receive the written value through the bank port.
//
// Purely combinational.  The pairwise comparator array and the priority of
// writes over reads follow the design description; returning a leader
// index (reused by later stages and the AND-OR array) is this design's
// encoding.
module agg_compare #(
  parameter int unsigned N     = rf_pkg::MST_NREAD + rf_pkg::MST_NWRITE,
  parameter int unsigned REG_W = rf_pkg::MST_BANK_W + rf_pkg::MST_IDX_W,
  localparam int unsigned LI_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]             valid,
  input  logic [N-1:0][REG_W-1:0]  regn,
  output logic [N-1:0][LI_W-1:0]   leader,
  output logic [N-1:0]             is_leader
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      leader[i] = LI_W'(i);
      for (int j = N - 1; j >= 0; j--) begin
        if (j < i && valid[j] && valid[i] && regn[j] == regn[i]) leader[i] = LI_W'(j);
      end
      is_leader[i] = valid[i] && (32'(leader[i]) == i);
    end
  end
endmodule
