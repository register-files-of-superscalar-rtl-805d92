// regfile_top: top level holding the three register file systems.
//
// The document proposes three independent ways to cut the area and
// energy of the register file of a superscalar core, and this top places
// one of each side by side with its own ports:
//   * mstage_rf   - MStage, the skewed multistaged multibanked register
//                   file (single-port banks, conflicting accesses retried in
//                   a second stage, skewed stall);
//   * bais_select - select logic of the bank-aware instruction scheduler,
//                   which issues only instructions whose register banks are
//                   free;
//   * bais_rf     - the multibanked register file behind that scheduler
//                   (no arbitration stage; an extra read cycle for two
//                   registers of one bank read by one instruction);
//   * norcs_rf    - NORCS, a register cache that always assumes a miss so
//                   that misses only cost time when they exceed the MRF
//                   read ports.
// The systems share only the clock and reset; they are alternatives, not a
// datapath.  All parameters are the package defaults (the configurations
// evaluated in the document).  Port timing is that of each block; see
// their headers.  Combining them in one top is this design's choice.
module regfile_top
  import rf_pkg::*;
#(
  localparam int unsigned MREG_W = MST_BANK_W + MST_IDX_W,
  localparam int unsigned BREG_W = BAIS_BANK_W + BAIS_IDX_W,
  localparam int unsigned BEI_W  = $clog2(BAIS_W),
  localparam int unsigned NTAG_W = $clog2(NRC_NREGS),
  localparam int unsigned NMC_W  = $clog2(NRC_NRD + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // ---------------- MStage
  input  logic                               mst_in_valid,
  output logic                               mst_in_ready,
  input  logic [MST_NREAD-1:0]               mst_rd_v,
  input  logic [MST_NREAD-1:0][MREG_W-1:0]   mst_rd_reg,
  input  logic [MST_NWRITE-1:0]              mst_wr_v,
  input  logic [MST_NWRITE-1:0][MREG_W-1:0]  mst_wr_reg,
  input  logic [MST_NWRITE-1:0][DATA_W-1:0]  mst_wr_data,
  output logic                               mst_out_valid,
  output logic [MST_NREAD-1:0]               mst_out_rd_v,
  output logic [MST_NREAD-1:0][DATA_W-1:0]   mst_out_rd_data,
  output logic                               mst_stall_front,
  output logic                               mst_stall_back,
  output logic                               mst_conflict,
  output logic                               mst_aggregated,
  // ---------------- BAIS
  input  logic [BAIS_W-1:0]                  bais_alloc,
  input  logic [BAIS_W-1:0]                  bais_req,
  input  logic [BAIS_W-1:0][1:0]             bais_src_v,
  input  logic [BAIS_W-1:0][1:0]             bais_src_rdy,
  input  logic [BAIS_W-1:0][1:0][BREG_W-1:0] bais_src_reg,
  input  logic [BAIS_W-1:0]                  bais_dst_v,
  input  logic [BAIS_W-1:0][BREG_W-1:0]      bais_dst_reg,
  output logic [BAIS_ISSUE-1:0]              bais_issue_v,
  output logic [BAIS_ISSUE-1:0][BEI_W-1:0]   bais_issue_idx,
  output logic [BAIS_ISSUE-1:0]              bais_issue_2nd_read,
  output logic                               bais_lost_bank,
  input  logic                               brf_in_valid,
  output logic                               brf_in_ready,
  input  logic [2*BAIS_ISSUE-1:0]            brf_rd_v,
  input  logic [2*BAIS_ISSUE-1:0][BREG_W-1:0] brf_rd_reg,
  input  logic [BAIS_ISSUE-1:0]              brf_wr_v,
  input  logic [BAIS_ISSUE-1:0][BREG_W-1:0]  brf_wr_reg,
  input  logic [BAIS_ISSUE-1:0][DATA_W-1:0]  brf_wr_data,
  output logic                               brf_out_valid,
  output logic [2*BAIS_ISSUE-1:0][DATA_W-1:0] brf_out_rd_data,
  output logic                               brf_second,
  // ---------------- NORCS
  input  logic                               nrc_in_valid,
  output logic                               nrc_in_ready,
  input  logic [NRC_NRD-1:0]                 nrc_rd_v,
  input  logic [NRC_NRD-1:0][NTAG_W-1:0]     nrc_rd_reg,
  input  logic [NRC_NWR-1:0]                 nrc_wr_v,
  input  logic [NRC_NWR-1:0][NTAG_W-1:0]     nrc_wr_reg,
  input  logic [NRC_NWR-1:0][DATA_W-1:0]     nrc_wr_data,
  output logic                               nrc_wr_ready,
  output logic                               nrc_out_valid,
  output logic [NRC_NRD-1:0][DATA_W-1:0]     nrc_out_rd_data,
  output logic                               nrc_stall,
  output logic [NMC_W-1:0]                   nrc_miss_cnt
);
  mstage_rf u_mstage (
    .clk, .rst_n,
    .in_valid(mst_in_valid), .in_ready(mst_in_ready),
    .rd_v(mst_rd_v), .rd_reg(mst_rd_reg),
    .wr_v(mst_wr_v), .wr_reg(mst_wr_reg), .wr_data(mst_wr_data),
    .out_valid(mst_out_valid), .out_rd_v(mst_out_rd_v), .out_rd_data(mst_out_rd_data),
    .stall_front(mst_stall_front), .stall_back(mst_stall_back),
    .conflict(mst_conflict), .aggregated(mst_aggregated));

  bais_select u_bais (
    .clk, .rst_n,
    .alloc(bais_alloc), .req(bais_req), .src_v(bais_src_v), .src_rdy(bais_src_rdy),
    .src_reg(bais_src_reg), .dst_v(bais_dst_v), .dst_reg(bais_dst_reg),
    .issue_v(bais_issue_v), .issue_idx(bais_issue_idx),
    .issue_2nd_read(bais_issue_2nd_read), .lost_bank(bais_lost_bank));

  bais_rf u_brf (
    .clk, .rst_n,
    .in_valid(brf_in_valid), .in_ready(brf_in_ready),
    .rd_v(brf_rd_v), .rd_reg(brf_rd_reg),
    .wr_v(brf_wr_v), .wr_reg(brf_wr_reg), .wr_data(brf_wr_data),
    .out_valid(brf_out_valid), .out_rd_data(brf_out_rd_data), .second(brf_second));

  norcs_rf u_norcs (
    .clk, .rst_n,
    .in_valid(nrc_in_valid), .in_ready(nrc_in_ready),
    .rd_v(nrc_rd_v), .rd_reg(nrc_rd_reg),
    .wr_v(nrc_wr_v), .wr_reg(nrc_wr_reg), .wr_data(nrc_wr_data), .wr_ready(nrc_wr_ready),
    .out_valid(nrc_out_valid), .out_rd_data(nrc_out_rd_data),
    .stall(nrc_stall), .miss_cnt(nrc_miss_cnt));
endmodule
