// norcs_rf: NORCS, the non-latency-oriented register cache system.
//
// A register cache (tag array norcs_rct + data array norcs_rcd) with as many
// ports as the core needs sits in front of a main register file
// (norcs_mrf) with few ports.  Unlike a latency-oriented register cache, the
// pipeline always assumes a miss: every operand spends the full MRF access
// time in the pipeline, so a miss costs nothing unless more operands miss
// in one cycle than the MRF has read ports.
//
//   RS     : the tag array is searched with the group's source registers.
//   RR1    : misses are routed by the register-number switch
//            (norcs_rn_switch) to the MRF read ports and the MRF decodes
//            them.  A hit whose cache entry is being, or was just,
//            re-allocated by blind write allocation turns into a miss here.
//            If more misses remain than MRF read ports, the group stays in
//            RR1 and the next batch is sent in the following cycle (the
//            pipeline stalls; the MRF keeps working in a pipelined manner).
//   RR2/CR : the MRF array is read (with a search of the write buffer for
//            values not yet drained) and the hits read the data array
//            with the one-hot wordlines from the tag array.
//
// Results are written into the register cache (blindly allocated) and
// into the write buffer (norcs_wb), which drains 2 per cycle into the MRF.
//
// Interface/timing: a group is accepted when in_valid && in_ready; its
// operands appear on out_rd_data with out_valid 2 cycles later plus one
// cycle per extra batch of misses.  Results are accepted when
// wr_ready (not stalled and room in the write buffer); wr_v must not
// depend on wr_ready.  A group reads the values written before the cycle
// it is accepted; a register must not be written while a group reading it
// is in flight (the renaming of the core guarantees this).  The 3-stage
// organisation, blind allocation, the port counts and stall-only-on-excess
// misses follow the NORCS description; the hit-to-miss conversion, the
// write-buffer search and holding the results during a stall are this
// design's choices.
module norcs_rf
  import rf_pkg::*;
#(
  parameter int unsigned NRD    = NRC_NRD,
  parameter int unsigned NWR    = NRC_NWR,
  parameter int unsigned RC_ENT = NRC_RC_ENT,
  parameter int unsigned NREGS  = NRC_NREGS,
  parameter int unsigned MRF_RP = NRC_MRF_RP,
  parameter int unsigned MRF_WP = NRC_MRF_WP,
  parameter int unsigned WB_ENT = NRC_WB_ENT,
  parameter int unsigned DW     = DATA_W,
  localparam int unsigned TAG_W = $clog2(NREGS),
  localparam int unsigned SW    = (NRD > 1) ? $clog2(NRD) : 1,
  localparam int unsigned MCW   = $clog2(NRD + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [NRD-1:0]            rd_v,
  input  logic [NRD-1:0][TAG_W-1:0] rd_reg,
  input  logic [NWR-1:0]            wr_v,
  input  logic [NWR-1:0][TAG_W-1:0] wr_reg,
  input  logic [NWR-1:0][DW-1:0]    wr_data,
  output logic                      wr_ready,
  output logic                      out_valid,
  output logic [NRD-1:0][DW-1:0]    out_rd_data,
  output logic                      stall,
  output logic [MCW-1:0]            miss_cnt
);
  // ------------------------------------------------ RS: tag search
  logic [NRD-1:0][RC_ENT-1:0] s_hit;
  logic [NWR-1:0][RC_ENT-1:0] w_wl;
  logic [RC_ENT-1:0]          alloc_mask;
  logic                       w_en, wb_in_ready;

  norcs_rct #(.ENT(RC_ENT), .TAG_W(TAG_W), .NS(NRD), .NW(NWR)) u_rct (
    .clk, .rst_n, .s_reg(rd_reg), .s_hit, .w_v(wr_v), .w_reg(wr_reg), .w_en,
    .w_wl, .alloc_mask);

  // ------------------------------------------------ RR1 state
  logic                       r1_v;
  logic [NRD-1:0]             r1_rdv, r1_pend;
  logic [NRD-1:0][RC_ENT-1:0] r1_hit;
  logic [NRD-1:0][TAG_W-1:0]  r1_reg;
  logic [RC_ENT-1:0]          amask_q;       // entries re-allocated last cycle

  logic [NRD-1:0] conv, need, served, left;
  always_comb
    for (int k = 0; k < NRD; k++) begin
      conv[k] = r1_v && |(r1_hit[k] & (amask_q | alloc_mask));
      need[k] = r1_v && (r1_pend[k] || conv[k]);
    end

  logic [MRF_RP-1:0]            port_v;
  logic [MRF_RP-1:0][TAG_W-1:0] port_reg;
  logic [MRF_RP-1:0][SW-1:0]    port_src;
  norcs_rn_switch #(.N(NRD), .NP(MRF_RP), .TAG_W(TAG_W)) u_sw (
    .miss(need), .regn(r1_reg), .port_v, .port_reg, .port_src, .served);

  assign left     = need & ~served;
  assign stall    = r1_v && (|left);
  assign in_ready = !stall;
  assign wr_ready = !stall && wb_in_ready;
  assign w_en     = wr_ready;
  always_comb begin
    miss_cnt = '0;
    for (int k = 0; k < NRD; k++) miss_cnt += MCW'(served[k]);
  end

  // ------------------------------------------------ CR state
  logic                       cr_v;
  logic [NRD-1:0]             cr_rdv;
  logic [NRD-1:0][RC_ENT-1:0] cr_hit;
  logic [MRF_RP-1:0][SW-1:0]  mq_src;
  logic [MRF_RP-1:0][TAG_W-1:0] mq_reg;
  logic [NRD-1:0][DW-1:0]     col_q;         // MRF data of earlier batches

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1_v    <= 1'b0;
      r1_pend <= '0;
      r1_hit  <= '0;
      r1_rdv  <= '0;
      r1_reg  <= '0;
      cr_v    <= 1'b0;
      cr_hit  <= '0;
      cr_rdv  <= '0;
      mq_src  <= '0;
      mq_reg  <= '0;
      amask_q <= '0;
    end else begin
      amask_q <= w_en ? alloc_mask : '0;
      mq_src  <= port_src;
      mq_reg  <= port_reg;
      if (stall) begin
        r1_pend <= left;
        for (int k = 0; k < NRD; k++) if (conv[k]) r1_hit[k] <= '0;
        cr_v    <= 1'b0;
      end else begin
        // RR1 -> CR
        cr_v   <= r1_v;
        cr_rdv <= r1_rdv;
        for (int k = 0; k < NRD; k++) cr_hit[k] <= conv[k] ? '0 : r1_hit[k];
        // RS -> RR1
        r1_v   <= in_valid;
        r1_rdv <= rd_v;
        r1_reg <= rd_reg;
        for (int k = 0; k < NRD; k++) begin
          r1_hit[k]  <= (in_valid && rd_v[k]) ? s_hit[k] : '0;
          r1_pend[k] <= in_valid && rd_v[k] && !(|s_hit[k]);
        end
      end
    end
  end

  // ------------------------------------------------ MRF, write buffer
  logic [MRF_RP-1:0][DW-1:0]    m_data, wbs_data, mval;
  logic [MRF_RP-1:0]            m_dv, wbs_hit;
  logic [MRF_WP-1:0]            wbo_v;
  logic [MRF_WP-1:0][TAG_W-1:0] wbo_reg;
  logic [MRF_WP-1:0][DW-1:0]    wbo_data;

  norcs_mrf #(.DEPTH(NREGS), .NRP(MRF_RP), .NWP(MRF_WP), .DW(DW)) u_mrf (
    .clk, .rst_n, .r_v(port_v & {MRF_RP{r1_v}}), .r_addr(port_reg), .r_data(m_data), .r_dv(m_dv),
    .w_v(wbo_v), .w_addr(wbo_reg), .w_data(wbo_data));

  norcs_wb #(.ENT(WB_ENT), .NIN(NWR), .NOUT(MRF_WP), .NS(MRF_RP), .TAG_W(TAG_W), .DW(DW)) u_wb (
    .clk, .rst_n, .in_v(wr_v & {NWR{w_en}}), .in_reg(wr_reg), .in_data(wr_data),
    .in_ready(wb_in_ready), .out_v(wbo_v), .out_reg(wbo_reg), .out_data(wbo_data),
    .s_reg(mq_reg), .s_hit(wbs_hit), .s_data(wbs_data));

  always_comb
    for (int p = 0; p < MRF_RP; p++) mval[p] = wbs_hit[p] ? wbs_data[p] : m_data[p];

  always_ff @(posedge clk)
    for (int p = 0; p < MRF_RP; p++)
      if (m_dv[p]) col_q[mq_src[p]] <= mval[p];

  // ------------------------------------------------ register cache data, CR output
  logic [NRD-1:0][DW-1:0]     rc_data;
  logic [NWR-1:0][RC_ENT-1:0] w_wl_en;
  always_comb
    for (int j = 0; j < NWR; j++) w_wl_en[j] = w_en ? w_wl[j] : '0;

  norcs_rcd #(.ENT(RC_ENT), .NR(NRD), .NW(NWR), .DW(DW)) u_rcd (
    .clk, .r_wl(cr_hit), .r_data(rc_data), .w_wl(w_wl_en), .w_data(wr_data));

  assign out_valid = cr_v;
  always_comb
    for (int k = 0; k < NRD; k++) begin
      out_rd_data[k] = '0;
      if (cr_v && cr_rdv[k]) begin
        if (|cr_hit[k]) out_rd_data[k] = rc_data[k];
        else begin
          out_rd_data[k] = col_q[k];
          for (int p = 0; p < MRF_RP; p++)
            if (m_dv[p] && 32'(mq_src[p]) == k) out_rd_data[k] = mval[p];
        end
      end
    end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n) stall |=> r1_v);
endmodule
