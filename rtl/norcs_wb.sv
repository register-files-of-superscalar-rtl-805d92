// norcs_wb: write buffer between the execution units and the NORCS MRF.
//
// Results arrive at up to NIN per cycle but the MRF has only NOUT write
// ports; the buffer absorbs bursts and drains the oldest NOUT entries
// every cycle, so the MRF write rate only has to match the average result
// rate.  Entries not yet drained can be searched by register number so
// that an MRF read never returns a stale value.
//
// Interface/timing: in_ready is registered-state only and is high when a
// whole set of NIN results fits; in_v results are stored at the clock edge
// (callers must only assert in_v with in_ready).  out_v/out_* show the
// oldest entries combinationally and they leave the buffer at the same
// edge (the MRF write ports always accept).  Search (s_reg -> s_hit/s_data)
// is combinational and returns the youngest matching entry.  Buffering
// with NIN inputs and NOUT outputs follows the NORCS description; FIFO
// order, the search and the all-or-nothing in_ready are this design's
// choices.
module norcs_wb
  import rf_pkg::*;
#(
  parameter int unsigned ENT   = NRC_WB_ENT,
  parameter int unsigned NIN   = NRC_NWR,
  parameter int unsigned NOUT  = NRC_MRF_WP,
  parameter int unsigned NS    = NRC_MRF_RP,
  parameter int unsigned TAG_W = NRC_TAG_W,
  parameter int unsigned DW    = DATA_W,
  localparam int unsigned CW   = $clog2(ENT + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NIN-1:0]             in_v,
  input  logic [NIN-1:0][TAG_W-1:0]  in_reg,
  input  logic [NIN-1:0][DW-1:0]     in_data,
  output logic                       in_ready,
  output logic [NOUT-1:0]            out_v,
  output logic [NOUT-1:0][TAG_W-1:0] out_reg,
  output logic [NOUT-1:0][DW-1:0]    out_data,
  input  logic [NS-1:0][TAG_W-1:0]   s_reg,
  output logic [NS-1:0]              s_hit,
  output logic [NS-1:0][DW-1:0]      s_data
);
  // storage kept compacted: entry 0 is the oldest
  logic [ENT-1:0][TAG_W-1:0] reg_q;
  logic [ENT-1:0][DW-1:0]    dat_q;
  logic [CW-1:0]             cnt_q;

  assign in_ready = 32'(cnt_q) + NIN <= ENT;

  always_comb
    for (int o = 0; o < NOUT; o++) begin
      out_v[o]    = 32'(cnt_q) > o;
      out_reg[o]  = (o < ENT) ? reg_q[o] : '0;
      out_data[o] = (o < ENT) ? dat_q[o] : '0;
    end

  always_comb
    for (int s = 0; s < NS; s++) begin
      s_hit[s]  = 1'b0;
      s_data[s] = '0;
      for (int e = 0; e < ENT; e++)         // later (younger) entries win
        if (32'(cnt_q) > e && reg_q[e] == s_reg[s]) begin
          s_hit[s]  = 1'b1;
          s_data[s] = dat_q[e];
        end
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else begin
      int unsigned nd, k;
      nd = (32'(cnt_q) < NOUT) ? 32'(cnt_q) : NOUT;
      // shift out the drained entries
      for (int e = 0; e < ENT; e++)
        if (e + nd < ENT) begin
          reg_q[e] <= reg_q[e + nd];
          dat_q[e] <= dat_q[e + nd];
        end
      // append the new results after the survivors
      k = 32'(cnt_q) - nd;
      for (int j = 0; j < NIN; j++)
        if (in_v[j] && in_ready && k < ENT) begin
          reg_q[k] <= in_reg[j];
          dat_q[k] <= in_data[j];
          k++;
        end
      cnt_q <= CW'(k);
    end
  end

  a_noover: assert property (@(posedge clk) disable iff (!rst_n) (|in_v) |-> in_ready);
endmodule
