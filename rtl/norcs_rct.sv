// norcs_rct: tag array (RCT) of the NORCS register cache.
//
// A small content-addressable memory holding the physical register number
// cached in each entry plus a valid flag.  Read side: every search port
// compares its register number with all entries at once and produces a
// one-hot read_hit wordline vector (match AND valid); these wordlines
// drive the data array directly, so the data array needs no decoder.
// Write side: results are allocated blindly, i.e. every result gets a new
// entry whether or not it will be read again.  Entries are handed out
// round-robin from a pointer: write port j takes the entry after those of
// the valid write ports below it.  An older entry holding the same register
// is invalidated in the same cycle so that a register is cached at most
// once.
//
// Interface/timing: search is combinational (RS stage) on the contents
// before this cycle's writes.  w_wl/alloc_mask are combinational from w_v
// and the pointer and report the entries the writes take if w_en is high;
// tags, valid flags and the pointer update at the clock edge only when
// w_en is high.  Round-robin replacement and the one-array CAM (instead of
// the duplicated destination/source CAM pair of the circuit) are this
// design's choices; search-gives-wordline and blind allocation follow the
// NORCS description.
module norcs_rct
  import rf_pkg::*;
#(
  parameter int unsigned ENT   = NRC_RC_ENT,
  parameter int unsigned TAG_W = NRC_TAG_W,
  parameter int unsigned NS    = NRC_NRD,
  parameter int unsigned NW    = NRC_NWR,
  localparam int unsigned PTR_W = (ENT > 1) ? $clog2(ENT) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NS-1:0][TAG_W-1:0]      s_reg,
  output logic [NS-1:0][ENT-1:0]        s_hit,
  input  logic [NW-1:0]                 w_v,
  input  logic [NW-1:0][TAG_W-1:0]      w_reg,
  input  logic                          w_en,
  output logic [NW-1:0][ENT-1:0]        w_wl,
  output logic [ENT-1:0]                alloc_mask
);
  logic [ENT-1:0][TAG_W-1:0] tag_q;
  logic [ENT-1:0]            val_q;
  logic [PTR_W-1:0]          ptr_q;

  // search: one comparator per (port, entry)
  always_comb
    for (int s = 0; s < NS; s++)
      for (int e = 0; e < ENT; e++)
        s_hit[s][e] = val_q[e] && tag_q[e] == s_reg[s];

  // blind allocation
  logic [PTR_W-1:0] ptr_n;
  always_comb begin
    int unsigned p;
    p = 32'(ptr_q);
    alloc_mask = '0;
    for (int j = 0; j < NW; j++) begin
      w_wl[j] = '0;
      if (w_v[j]) begin
        w_wl[j][p] = 1'b1;
        alloc_mask[p] = 1'b1;
        p = (p + 1 == ENT) ? 0 : p + 1;
      end
    end
    ptr_n = PTR_W'(p);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val_q <= '0;
      ptr_q <= '0;
      tag_q <= '0;
    end else if (w_en) begin
      for (int e = 0; e < ENT; e++) begin
        for (int j = 0; j < NW; j++)
          if (w_v[j] && val_q[e] && tag_q[e] == w_reg[j]) val_q[e] <= 1'b0;   // old copy
        for (int j = 0; j < NW; j++)
          if (w_wl[j][e]) begin
            tag_q[e] <= w_reg[j];
            val_q[e] <= 1'b1;
          end
      end
      ptr_q <= ptr_n;
    end
  end

  // at most one valid copy of a register
  for (genvar s = 0; s < NS; s++) begin : g_chk
    a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_hit[s]));
  end
endmodule
