// norcs_mrf: main register file (MRF) of NORCS.
//
// Holds all physical registers but has only NRP read and NWP write ports.
// Its read is pipelined in two stages: in RR1 the register number is
// decoded and the wordline select is latched; in RR2 the array is read.  A
// new read can therefore start on every port every cycle, with the data
// one cycle after the request, and the MRF keeps streaming even while the
// rest of the pipeline is stalled.
//
// Interface/timing: r_v/r_addr are sampled at the clock edge ending RR1;
// r_dv/r_data are valid combinationally during the next cycle (RR2).
// Writes take effect at the clock edge; an RR2 read of a register written
// in the same cycle returns the old value.  The two-stage pipelined read
// and the port counts follow the NORCS description; the plain array in
// place of the two-column cell arrangement is this design's choice.
module norcs_mrf
  import rf_pkg::*;
#(
  parameter int unsigned DEPTH = NRC_NREGS,
  parameter int unsigned NRP   = NRC_MRF_RP,
  parameter int unsigned NWP   = NRC_MRF_WP,
  parameter int unsigned DW    = DATA_W,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NRP-1:0]         r_v,
  input  logic [NRP-1:0][AW-1:0] r_addr,
  output logic [NRP-1:0][DW-1:0] r_data,
  output logic [NRP-1:0]         r_dv,
  input  logic [NWP-1:0]         w_v,
  input  logic [NWP-1:0][AW-1:0] w_addr,
  input  logic [NWP-1:0][DW-1:0] w_data
);
  logic [DEPTH-1:0][DW-1:0] mem_q;
  logic [NRP-1:0]           dv_q;
  logic [NRP-1:0][AW-1:0]   addr_q;     // RR1 -> RR2 latch of the decoded row

  always_ff @(posedge clk) begin
    if (!rst_n) dv_q <= '0;
    else        dv_q <= r_v;
    addr_q <= r_addr;
  end

  always_comb
    for (int p = 0; p < NRP; p++) begin
      r_dv[p]   = dv_q[p];
      r_data[p] = (dv_q[p] && 32'(addr_q[p]) < DEPTH) ? mem_q[addr_q[p]] : '0;
    end

  always_ff @(posedge clk)
    for (int j = 0; j < NWP; j++)
      if (w_v[j] && 32'(w_addr[j]) < DEPTH) mem_q[w_addr[j]] <= w_data[j];
endmodule
