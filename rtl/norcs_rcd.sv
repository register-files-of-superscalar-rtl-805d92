// norcs_rcd: data array (RCD) of the NORCS register cache.
//
// Holds the 64-bit values of the cached registers.  There is no address
// decoder: each read port is driven by the one-hot read_hit wordlines that
// the tag array produced, and each write port by the one-hot wordlines of
// the entry that blind allocation picked.  A read with no wordline set
// returns 0 (the single-ended read bitline stays precharged).
//
// Interface/timing: reads are combinational (CR stage); writes take effect
// at the clock edge, so a read in the same cycle as a write to the entry
// returns the old value.  Decoder-less wordline drive follows the NORCS
// circuit description; modelling the read bitline as an OR of the
// selected words is this design's choice.
module norcs_rcd
  import rf_pkg::*;
#(
  parameter int unsigned ENT = NRC_RC_ENT,
  parameter int unsigned NR  = NRC_NRD,
  parameter int unsigned NW  = NRC_NWR,
  parameter int unsigned DW  = DATA_W
) (
  input  logic                    clk,
  input  logic [NR-1:0][ENT-1:0]  r_wl,
  output logic [NR-1:0][DW-1:0]   r_data,
  input  logic [NW-1:0][ENT-1:0]  w_wl,
  input  logic [NW-1:0][DW-1:0]   w_data
);
  logic [ENT-1:0][DW-1:0] mem_q;

  always_comb
    for (int r = 0; r < NR; r++) begin
      r_data[r] = '0;
      for (int e = 0; e < ENT; e++)
        if (r_wl[r][e]) r_data[r] |= mem_q[e];
    end

  always_ff @(posedge clk)
    for (int e = 0; e < ENT; e++)
      for (int j = 0; j < NW; j++)
        if (w_wl[j][e]) mem_q[e] <= w_data[j];
endmodule
