// bais_select: select logic of the bank-aware instruction scheduler (BAIS).
//
// A multibanked register file with single-port banks fails when two issued
// instructions need the same bank in the same cycle.  BAIS avoids this at
// the source: it only issues instructions whose banks are free.  Three
// groups of arbiters work in the same cycle:
//
//   * the conventional select logic: ISSUE cascaded fixed-priority
//     arbiters pick up to ISSUE ready instructions from the W-entry window
//     (gp[i][p]: entry i chosen for issue port p);
//   * one read arbiter per bank: every ready entry decodes the bank numbers
//     of its source registers, ORs them and requests each bank it needs;
//     gr[i] is set when all of entry i's bank requests are granted.  A bank
//     that a write of an earlier-issued instruction will use in the read
//     cycle is busy and grants nothing;
//   * one write arbiter per bank for the destination register (gw[i]).
//
// Entry i issues from port p when gp[i][p] && gr[i] && gw[i].  The bank
// arbiters work in parallel with one another, so the select path only
// grows by the final AND.
//
// Bypass awareness: an operand's ready flag reaches the read-arbiter
// decoder through two flip-flops, so an operand woken up in the last two
// cycles (delivered by the bypass network) does not request its bank.  An
// operand already ready when its entry is dispatched loads both
// flip-flops at once.  Two source operands in the same bank need only one
// access when they name the same register (the read switch duplicates the
// word); otherwise issue_2nd_read tells the back end that one more read
// cycle is needed.
//
// Timing: combinational from the window state to issue_v/issue_idx in the
// select cycle; the delay flip-flops and the write reservations (a bank
// granted to a write is busy for reads WB_DIST cycles later) are updated at
// the clock edge.  Structure, busy gating and the two-cycle ready delay
// follow the design description; fixed lowest-index priority, the
// dispatch-time loading of the delay flip-flops and WB_DIST are this
// design's choices.
module bais_select
  import rf_pkg::*;
#(
  parameter int unsigned W       = BAIS_W,
  parameter int unsigned ISSUE   = BAIS_ISSUE,
  parameter int unsigned NBANK   = BAIS_NBANK,
  parameter int unsigned BANK_W  = BAIS_BANK_W,
  parameter int unsigned IDX_W   = BAIS_IDX_W,
  parameter int unsigned WB_DIST = BAIS_WB_DIST,
  localparam int unsigned REG_W  = BANK_W + IDX_W,
  localparam int unsigned EI_W   = (W > 1) ? $clog2(W) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [W-1:0]                  alloc,
  input  logic [W-1:0]                  req,
  input  logic [W-1:0][1:0]             src_v,
  input  logic [W-1:0][1:0]             src_rdy,
  input  logic [W-1:0][1:0][REG_W-1:0]  src_reg,
  input  logic [W-1:0]                  dst_v,
  input  logic [W-1:0][REG_W-1:0]       dst_reg,
  output logic [ISSUE-1:0]              issue_v,
  output logic [ISSUE-1:0][EI_W-1:0]    issue_idx,
  output logic [ISSUE-1:0]              issue_2nd_read,
  output logic                          lost_bank
);
  // ------------------------------------------------ delayed ready flags
  logic [W-1:0][1:0] rdy1_q, rdy2_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdy1_q <= '0;
      rdy2_q <= '0;
    end else begin
      for (int i = 0; i < W; i++) begin
        rdy1_q[i] <= src_rdy[i];
        rdy2_q[i] <= alloc[i] ? src_rdy[i] : rdy1_q[i];
      end
    end
  end

  // ------------------------------------------------ write reservations
  logic [WB_DIST-1:0][NBANK-1:0] wres_q;
  logic [NBANK-1:0] busy, wres_n;
  assign busy = wres_q[WB_DIST-1];

  // ------------------------------------------------ bank requests
  logic [W-1:0][1:0]       rq;        // operand reads its bank
  logic [NBANK-1:0][W-1:0] need_r, need_w;
  always_comb begin
    for (int i = 0; i < W; i++)
      for (int k = 0; k < 2; k++)
        rq[i][k] = src_v[i][k] && rdy2_q[i][k];
    for (int b = 0; b < NBANK; b++)
      for (int i = 0; i < W; i++) begin
        need_r[b][i] = req[i] && ((rq[i][0] && 32'(src_reg[i][0][REG_W-1 -: BANK_W]) == b) ||
                                  (rq[i][1] && 32'(src_reg[i][1][REG_W-1 -: BANK_W]) == b));
        need_w[b][i] = req[i] && dst_v[i] && 32'(dst_reg[i][REG_W-1 -: BANK_W]) == b;
      end
  end

  // read and write arbiters, one per bank, all in parallel
  logic [NBANK-1:0][W-1:0] gnt_r, gnt_w;
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      logic done_r, done_w;
      done_r = busy[b];
      done_w = 1'b0;
      gnt_r[b] = '0;
      gnt_w[b] = '0;
      for (int i = 0; i < W; i++) begin
        if (need_r[b][i] && !done_r) begin gnt_r[b][i] = 1'b1; done_r = 1'b1; end
        if (need_w[b][i] && !done_w) begin gnt_w[b][i] = 1'b1; done_w = 1'b1; end
      end
    end
  end

  logic [W-1:0] gr, gw;
  always_comb begin
    for (int i = 0; i < W; i++) begin
      gr[i] = 1'b1;
      gw[i] = 1'b1;
      for (int b = 0; b < NBANK; b++) begin
        if (need_r[b][i] && !gnt_r[b][i]) gr[i] = 1'b0;
        if (need_w[b][i] && !gnt_w[b][i]) gw[i] = 1'b0;
      end
    end
  end

  // ------------------------------------------------ conventional select (cascaded)
  logic [ISSUE-1:0]           gp_v;
  logic [ISSUE-1:0][EI_W-1:0] gp_idx;
  always_comb begin
    logic [W-1:0] left;
    left = req;
    for (int p = 0; p < ISSUE; p++) begin
      gp_v[p]   = 1'b0;
      gp_idx[p] = '0;
      for (int i = 0; i < W; i++)
        if (left[i] && !gp_v[p]) begin
          gp_v[p]   = 1'b1;
          gp_idx[p] = EI_W'(i);
        end
      if (gp_v[p]) left[gp_idx[p]] = 1'b0;     // withdraw the granted request
    end
  end

  // ------------------------------------------------ final AND, outputs
  always_comb begin
    wres_n    = '0;
    lost_bank = 1'b0;
    for (int p = 0; p < ISSUE; p++) begin
      issue_v[p]        = gp_v[p] && gr[gp_idx[p]] && gw[gp_idx[p]];
      issue_idx[p]      = gp_idx[p];
      issue_2nd_read[p] = issue_v[p] && (&rq[gp_idx[p]]) &&
                          src_reg[gp_idx[p]][0][REG_W-1 -: BANK_W] == src_reg[gp_idx[p]][1][REG_W-1 -: BANK_W] &&
                          src_reg[gp_idx[p]][0] != src_reg[gp_idx[p]][1];
      lost_bank        |= gp_v[p] && !issue_v[p];
      if (issue_v[p] && dst_v[gp_idx[p]])
        wres_n[dst_reg[gp_idx[p]][REG_W-1 -: BANK_W]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) wres_q <= '0;
    else begin
      wres_q[0] <= wres_n;
      for (int k = 1; k < WB_DIST; k++) wres_q[k] <= wres_q[k-1];
    end
  end

  // the cascade never hands one entry to two issue ports
  if (ISSUE > 1) begin : g_chk
    a_distinct: assert property (@(posedge clk) disable iff (!rst_n)
      (issue_v[0] && issue_v[1]) |-> (gp_idx[0] != gp_idx[1]));
  end
endmodule
