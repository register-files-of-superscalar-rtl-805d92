// mstage_rf: skewed multistaged multibanked register file (MStage).
//
// The register file is split into NBANK banks of single-port (1-read/write)
// cells.  Every cycle an issue group arrives: up to NREAD source-operand
// reads of the issued instructions and up to NWRITE result writes.  Each
// access needs its bank for one cycle.  Instead of stalling whenever two
// accesses meet in one bank, MStage gives every access two chances:
//
//   cycle c    rn1  : new accesses arbitrate (arbiter + register number
//                     routing).  A winner reads its bank in c+1 (RR1), its
//                     word waits in d1 (c+2) and reaches d2 in c+3.
//   cycle c+1  rn2  : a loser retries with priority over newer accesses,
//                     reads the bank in c+2 (RR2) and reaches d2 in c+3.
//   cycle c+2  rnx  : a second loser (a bank met 3 or more accesses) takes
//                     the bank with top priority and the pipeline stalls.
//
// So the two physical stages (arbiter/register number switch, bank/read
// switch) slide over three virtual stages, and every operand of a group is
// in d2 together three cycles after rn1.  A stall is taken in two skewed
// halves: while an access sits in rnx the issue side (rn1, rn2, in_ready)
// is frozen; one cycle later, while that access reads its bank, the data
// side (d1, d2, execution) is frozen.  The bubble made in front is thereby
// absorbed exactly at the back and the groups stay aligned.
//
// Request aggregation: new accesses naming the same register share one
// bank access (comparator array before, AND-OR array after the arbiters).
// Writes rank ahead of reads, so a read aggregated with a write of the same
// register gets the new value from the bank port.  Accesses within a bank
// are served first-come first-served: rnx > rn2 > rn1, then by port index.
//
// Interface: in_valid/in_ready handshake for the issue group (rd_* and
// wr_* fields), out_valid with out_rd_v/out_rd_data for the group whose
// operands are complete.  stall_front/stall_back, conflict and aggregated
// are event outputs for performance counting.
//
// Follows the design description: banks of 1-read/write cells, two bank
// stages with carry-over of one loser and FCFS priority, stall on three or
// more accesses per bank, request aggregation of reads and writes with
// writes first, comparators only on new accesses.  This design's own
// choices: writes travel in the same group as the reads; the issue side is
// frozen one cycle ahead of the data side; fixed port-order priority.
module mstage_rf
  import rf_pkg::*;
#(
  parameter int unsigned NREAD      = MST_NREAD,
  parameter int unsigned NWRITE     = MST_NWRITE,
  parameter int unsigned NBANK      = MST_NBANK,
  parameter int unsigned BANK_DEPTH = MST_BANK_DEPTH,
  parameter int unsigned BANK_W     = MST_BANK_W,
  parameter int unsigned IDX_W      = MST_IDX_W,
  parameter int unsigned DW         = DATA_W,
  localparam int unsigned REG_W     = BANK_W + IDX_W,
  localparam int unsigned NP        = NWRITE + NREAD,
  localparam int unsigned LI_W      = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned RI_W      = $clog2(2 * NP),
  localparam int unsigned BS_W      = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // issue group
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [NREAD-1:0]             rd_v,
  input  logic [NREAD-1:0][REG_W-1:0]  rd_reg,
  input  logic [NWRITE-1:0]            wr_v,
  input  logic [NWRITE-1:0][REG_W-1:0] wr_reg,
  input  logic [NWRITE-1:0][DW-1:0]    wr_data,
  // operands to the execution units
  output logic                         out_valid,
  output logic [NREAD-1:0]             out_rd_v,
  output logic [NREAD-1:0][DW-1:0]     out_rd_data,
  // events
  output logic                         stall_front,
  output logic                         stall_back,
  output logic                         conflict,
  output logic                         aggregated
);
  typedef struct packed {
    logic             v;
    logic             we;
    logic [REG_W-1:0] regn;
    logic [DW-1:0]    wdata;
    logic [LI_W-1:0]  leader;
  } acc_t;

  // ---------------------------------------------------------------- state
  acc_t [NP-1:0]    rn1_q, rn2_q, rnx_q;
  logic             g1_q;                        // group valid in rn1
  logic             gb_q, d1g_q, d2g_q;          // group valid in bank, d1, d2
  logic             ff_q;                        // data-side freeze
  logic [NREAD-1:0] bkl_v_q, bkh_v_q;            // read port served in bank stage (new / late)
  logic [NREAD-1:0][BS_W-1:0] bkl_b_q, bkh_b_q;  // ... and from which bank
  logic [NREAD-1:0] d1_v_q, d2_v_q;
  logic [NREAD-1:0][DW-1:0] d1_q, d2_q;
  logic [NBANK-1:0]             bq_v_q, bq_we_q;
  logic [NBANK-1:0][IDX_W-1:0]  bq_idx_q;
  logic [NBANK-1:0][DW-1:0]     bq_wd_q;

  // ---------------------------------------------------------------- front
  logic front_freeze;
  always_comb begin
    front_freeze = 1'b0;
    for (int p = 0; p < NP; p++) front_freeze |= rnx_q[p].v;
  end
  assign in_ready    = !front_freeze;
  assign stall_front = front_freeze;

  // high class: the carried-over accesses (rnx while frozen, else rn2)
  acc_t [NP-1:0] hi;
  always_comb hi = front_freeze ? rnx_q : rn2_q;

  // comparator array on the new accesses
  logic [NP-1:0]             lo_v;
  logic [NP-1:0][REG_W-1:0]  lo_reg;
  logic [NP-1:0][LI_W-1:0]   lo_leader;
  logic [NP-1:0]             lo_is_leader;
  always_comb
    for (int p = 0; p < NP; p++) begin
      lo_v[p]   = rn1_q[p].v;
      lo_reg[p] = rn1_q[p].regn;
    end

  agg_compare #(.N(NP), .REG_W(REG_W)) u_cmp (
    .valid(lo_v), .regn(lo_reg), .leader(lo_leader), .is_leader(lo_is_leader));

  // arbiter requests: [0, NP) carried-over, [NP, 2NP) new
  logic [2*NP-1:0]              req;
  logic [2*NP-1:0][BANK_W-1:0]  req_bank;
  logic [2*NP-1:0][IDX_W-1:0]   req_idx;
  logic [2*NP-1:0][DW-1:0]      req_wd;
  logic [2*NP-1:0]              req_we;
  logic [NP-1:0]                hi_v;
  logic [NP-1:0][LI_W-1:0]      hi_leader;
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      hi_v[p]         = hi[p].v;
      hi_leader[p]    = hi[p].leader;
      req[p]          = hi[p].v && (32'(hi[p].leader) == p);
      req[NP+p]       = lo_is_leader[p] && !front_freeze;
      req_bank[p]     = hi[p].regn[REG_W-1 -: BANK_W];
      req_bank[NP+p]  = rn1_q[p].regn[REG_W-1 -: BANK_W];
      req_idx[p]      = hi[p].regn[IDX_W-1:0];
      req_idx[NP+p]   = rn1_q[p].regn[IDX_W-1:0];
      req_wd[p]       = hi[p].wdata;
      req_wd[NP+p]    = rn1_q[p].wdata;
      req_we[p]       = hi[p].we;
      req_we[NP+p]    = rn1_q[p].we;
    end
  end

  logic [2*NP-1:0]             gnt;
  logic [NBANK-1:0]            bank_gnt_v;
  logic [NBANK-1:0][RI_W-1:0]  bank_gnt_idx;
  bank_arbiter #(.NREQ(2*NP), .NBANK(NBANK), .BANK_W(BANK_W)) u_arb (
    .req(req), .bank(req_bank), .bank_en({NBANK{1'b1}}),
    .gnt(gnt), .bank_gnt_v(bank_gnt_v), .bank_gnt_idx(bank_gnt_idx));

  // AND-OR arrays: followers take their leader's grant
  logic [NP-1:0] g_hi, g_lo, lo_v_en;
  assign lo_v_en = front_freeze ? '0 : lo_v;
  agg_andor #(.N(NP)) u_andor_hi (.valid(hi_v),    .leader(hi_leader), .gnt_in(gnt[NP-1:0]),    .gnt_out(g_hi));
  agg_andor #(.N(NP)) u_andor_lo (.valid(lo_v_en), .leader(lo_leader), .gnt_in(gnt[2*NP-1:NP]), .gnt_out(g_lo));

  // register number switch and write data switch (arbitration stage)
  logic [NBANK-1:0][IDX_W-1:0] sw_idx;
  logic [NBANK-1:0][DW-1:0]    sw_wd;
  logic [NBANK-1:0][0:0]       sw_we;
  logic [2*NP-1:0][0:0]        req_we1;
  always_comb for (int k = 0; k < 2*NP; k++) req_we1[k] = req_we[k];
  mb_switch #(.NIN(2*NP), .NOUT(NBANK), .W(IDX_W)) u_rnsw (.din(req_idx), .sel(bank_gnt_idx), .dout(sw_idx));
  mb_switch #(.NIN(2*NP), .NOUT(NBANK), .W(DW))    u_wsw  (.din(req_wd),  .sel(bank_gnt_idx), .dout(sw_wd));
  mb_switch #(.NIN(2*NP), .NOUT(NBANK), .W(1))     u_wesw (.din(req_we1), .sel(bank_gnt_idx), .dout(sw_we));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        rn1_q[p] <= '0; rn2_q[p] <= '0; rnx_q[p] <= '0;
      end
      g1_q <= 1'b0; gb_q <= 1'b0;
      bkl_v_q <= '0; bkh_v_q <= '0;
      bq_v_q <= '0;
    end else begin
      bq_v_q   <= bank_gnt_v;
      bq_we_q  <= '0;
      for (int b = 0; b < NBANK; b++) bq_we_q[b] <= sw_we[b][0];
      bq_idx_q <= sw_idx;
      bq_wd_q  <= sw_wd;
      bkl_v_q  <= '0;
      bkh_v_q  <= '0;
      for (int r = 0; r < NREAD; r++) begin
        bkl_b_q[r] <= BS_W'(rn1_q[NWRITE+r].regn[REG_W-1 -: BANK_W]);
        bkh_b_q[r] <= BS_W'(hi[NWRITE+r].regn[REG_W-1 -: BANK_W]);
        bkl_v_q[r] <= g_lo[NWRITE+r] && !rn1_q[NWRITE+r].we;
        bkh_v_q[r] <= g_hi[NWRITE+r] && !hi[NWRITE+r].we;
      end
      if (!front_freeze) begin
        for (int p = 0; p < NP; p++) begin
          // carried-over access: granted, or lost a second time -> rnx
          rnx_q[p] <= (rn2_q[p].v && !g_hi[p]) ? rn2_q[p] : '0;
          // new access: lost -> rn2 (remembering its leader)
          if (rn1_q[p].v && !g_lo[p]) begin
            rn2_q[p]        <= rn1_q[p];
            rn2_q[p].leader <= lo_leader[p];
          end else begin
            rn2_q[p] <= '0;
          end
        end
        // new group into rn1
        g1_q <= in_valid;
        gb_q <= g1_q;
        for (int w = 0; w < NWRITE; w++) begin
          rn1_q[w].v      <= in_valid && wr_v[w];
          rn1_q[w].we     <= 1'b1;
          rn1_q[w].regn   <= wr_reg[w];
          rn1_q[w].wdata  <= wr_data[w];
          rn1_q[w].leader <= LI_W'(w);
        end
        for (int r = 0; r < NREAD; r++) begin
          rn1_q[NWRITE+r].v      <= in_valid && rd_v[r];
          rn1_q[NWRITE+r].we     <= 1'b0;
          rn1_q[NWRITE+r].regn   <= rd_reg[r];
          rn1_q[NWRITE+r].wdata  <= '0;
          rn1_q[NWRITE+r].leader <= LI_W'(NWRITE + r);
        end
      end else begin
        // frozen front: only the rnx accesses move
        gb_q <= 1'b0;
        for (int p = 0; p < NP; p++)
          if (g_hi[p]) rnx_q[p] <= '0;
      end
    end
  end

  // ---------------------------------------------------------------- banks
  logic [NBANK-1:0][DW-1:0] bank_rd;
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    rf_bank #(.DEPTH(BANK_DEPTH), .IDX_W(IDX_W), .DATA_W(DW)) u_bank (
      .clk(clk), .en(bq_v_q[b]), .we(bq_we_q[b]), .idx(bq_idx_q[b]),
      .wdata(bq_wd_q[b]), .rdata(bank_rd[b]));
  end

  // read data switch: banks -> (new, late) slot of every read port
  logic [2*NREAD-1:0][BS_W-1:0] rsel;
  logic [2*NREAD-1:0][DW-1:0]   rdat;
  always_comb
    for (int r = 0; r < NREAD; r++) begin
      rsel[r]       = bkl_b_q[r];
      rsel[NREAD+r] = bkh_b_q[r];
    end
  mb_switch #(.NIN(NBANK), .NOUT(2*NREAD), .W(DW)) u_rsw (.din(bank_rd), .sel(rsel), .dout(rdat));

  // ---------------------------------------------------------------- back
  assign stall_back = ff_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ff_q   <= 1'b0;
      d1g_q  <= 1'b0;
      d2g_q  <= 1'b0;
      d1_v_q <= '0;
      d2_v_q <= '0;
    end else begin
      ff_q <= front_freeze;
      if (!ff_q) begin
        d1g_q <= gb_q;
        d2g_q <= d1g_q;
        for (int r = 0; r < NREAD; r++) begin
          d1_v_q[r] <= bkl_v_q[r];
          d1_q[r]   <= rdat[r];
          d2_v_q[r] <= d1_v_q[r] || bkh_v_q[r];
          d2_q[r]   <= bkh_v_q[r] ? rdat[NREAD+r] : d1_q[r];
        end
      end else begin
        for (int r = 0; r < NREAD; r++)
          if (bkh_v_q[r]) begin
            d2_v_q[r] <= 1'b1;
            d2_q[r]   <= rdat[NREAD+r];
          end
      end
    end
  end

  assign out_valid   = d2g_q && !ff_q;
  assign out_rd_v    = d2_v_q;
  assign out_rd_data = d2_q;

  // ---------------------------------------------------------------- events
  always_comb begin
    conflict   = 1'b0;
    aggregated = 1'b0;
    for (int p = 0; p < NP; p++) begin
      conflict   |= !front_freeze && rn1_q[p].v && !g_lo[p];
      aggregated |= (g_lo[p] && !lo_is_leader[p]) || (g_hi[p] && 32'(hi[p].leader) != p);
    end
  end

  // ---------------------------------------------------------------- rules
  // the data side freezes exactly one cycle after the issue side
  a_skew: assert property (@(posedge clk) disable iff (!rst_n) ff_q == $past(front_freeze));
  // nothing new reaches the banks while the issue side is frozen
  a_nonew: assert property (@(posedge clk) disable iff (!rst_n) front_freeze |-> (g_lo == '0));
  // a new-class bank read never lands in a frozen data cycle
  a_d1: assert property (@(posedge clk) disable iff (!rst_n) ff_q |-> (bkl_v_q == '0));
endmodule
