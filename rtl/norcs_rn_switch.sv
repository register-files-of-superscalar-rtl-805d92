// norcs_rn_switch: register-number read switch of NORCS.
//
// The register cache has as many read ports as operands, the MRF only NP.
// This switch, controlled by the hit/miss result of the tag array, routes
// the register numbers of the operands that missed to the MRF read ports:
// the lowest-index missing operand to port 0, the next to port 1, and so
// on.  Operands beyond NP wait for a later cycle; `served` tells which
// operands were routed now.
//
// Interface/timing: purely combinational (RR1 stage).  port_src gives the
// operand index on each port so the returning data can be steered back.
// The switch and its control by the miss vector follow the NORCS
// description; lowest-index-first routing is this design's choice.
module norcs_rn_switch
  import rf_pkg::*;
#(
  parameter int unsigned N     = NRC_NRD,
  parameter int unsigned NP    = NRC_MRF_RP,
  parameter int unsigned TAG_W = NRC_TAG_W,
  localparam int unsigned SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]              miss,
  input  logic [N-1:0][TAG_W-1:0]   regn,
  output logic [NP-1:0]             port_v,
  output logic [NP-1:0][TAG_W-1:0]  port_reg,
  output logic [NP-1:0][SW-1:0]     port_src,
  output logic [N-1:0]              served
);
  always_comb begin
    logic [N-1:0] left;
    left   = miss;
    served = '0;
    for (int p = 0; p < NP; p++) begin
      port_v[p]   = 1'b0;
      port_reg[p] = '0;
      port_src[p] = '0;
      for (int i = 0; i < N; i++)
        if (left[i] && !port_v[p]) begin
          port_v[p]   = 1'b1;
          port_reg[p] = regn[i];
          port_src[p] = SW'(i);
        end
      if (port_v[p]) begin
        left[port_src[p]]   = 1'b0;
        served[port_src[p]] = 1'b1;
      end
    end
  end
endmodule
