// tb_regfile_top: end-to-end testbench of regfile_top at its default sizes.
//
// Three threads run in parallel, one per register file system, each with
// its own reference model:
//   * MStage: all 180 registers are preloaded, then random issue groups (10
//     reads, 5 writes; repeated registers and reads of same-group writes
//     included) flow through; every delivered operand is compared with a
//     reference register array and the delivery cycle with 3 cycles plus
//     the data-side stall cycles in between.
//   * BAIS: a random 64-entry window is scheduled; the testbench keeps its
//     own copy of the two-cycle ready delay and of the write reservations
//     and checks that the issued instructions are ready, distinct, never
//     share a read bank or a write bank, and never read a bank reserved
//     for a write.
//     Issued operands woken up in the last two cycles (bypassed, so
//     they claim no bank) are counted.
//   * NORCS: all 128 registers are preloaded through the result ports, then
//     random groups of 8 operands (half from recently written registers)
//     and up to 4 results per cycle run; operands are compared with a
//     reference array and the output cycle with 2 cycles plus the stall
//     cycles in between.
// Each mechanism is counted and must occur at least once: MStage
// carry-over to the second stage, request aggregation and the skewed
// stall; BAIS bank-conflict rejections, write-reservation blocking and
// second-read cycles, bypass-delayed operands; NORCS MRF reads of misses,
// miss stalls, write-buffer backpressure and hits turned into misses by
// re-allocation (observed on the NORCS instance's internal signal).
`timescale 1ns/1ps
module tb_regfile_top;
  import rf_pkg::*;
  localparam int MREG_W = MST_BANK_W + MST_IDX_W;
  localparam int BREG_W = BAIS_BANK_W + BAIS_IDX_W, BEI_W = $clog2(BAIS_W);
  localparam int NTAG_W = $clog2(NRC_NREGS), NMC_W = $clog2(NRC_NRD + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // MStage ports
  logic                              mst_in_valid, mst_in_ready, mst_out_valid;
  logic [MST_NREAD-1:0]              mst_rd_v, mst_out_rd_v;
  logic [MST_NREAD-1:0][MREG_W-1:0]  mst_rd_reg;
  logic [MST_NWRITE-1:0]             mst_wr_v;
  logic [MST_NWRITE-1:0][MREG_W-1:0] mst_wr_reg;
  logic [MST_NWRITE-1:0][DATA_W-1:0] mst_wr_data;
  logic [MST_NREAD-1:0][DATA_W-1:0]  mst_out_rd_data;
  logic mst_stall_front, mst_stall_back, mst_conflict, mst_aggregated;
  // BAIS ports
  logic [BAIS_W-1:0]                  bais_alloc, bais_req, bais_dst_v;
  logic [BAIS_W-1:0][1:0]             bais_src_v, bais_src_rdy;
  logic [BAIS_W-1:0][1:0][BREG_W-1:0] bais_src_reg;
  logic [BAIS_W-1:0][BREG_W-1:0]      bais_dst_reg;
  logic [BAIS_ISSUE-1:0]              bais_issue_v, bais_issue_2nd_read;
  logic [BAIS_ISSUE-1:0][BEI_W-1:0]   bais_issue_idx;
  logic                               bais_lost_bank;
  // BAIS register file ports
  localparam int BRP = 2 * BAIS_ISSUE, BWP = BAIS_ISSUE;
  logic                        brf_in_valid, brf_in_ready, brf_out_valid, brf_second;
  logic [BRP-1:0]              brf_rd_v;
  logic [BRP-1:0][BREG_W-1:0]  brf_rd_reg;
  logic [BWP-1:0]              brf_wr_v;
  logic [BWP-1:0][BREG_W-1:0]  brf_wr_reg;
  logic [BWP-1:0][DATA_W-1:0]  brf_wr_data;
  logic [BRP-1:0][DATA_W-1:0]  brf_out_rd_data;
  // NORCS ports
  logic                           nrc_in_valid, nrc_in_ready, nrc_wr_ready, nrc_out_valid, nrc_stall;
  logic [NRC_NRD-1:0]             nrc_rd_v;
  logic [NRC_NRD-1:0][NTAG_W-1:0] nrc_rd_reg;
  logic [NRC_NWR-1:0]             nrc_wr_v;
  logic [NRC_NWR-1:0][NTAG_W-1:0] nrc_wr_reg;
  logic [NRC_NWR-1:0][DATA_W-1:0] nrc_wr_data;
  logic [NRC_NRD-1:0][DATA_W-1:0] nrc_out_rd_data;
  logic [NMC_W-1:0]               nrc_miss_cnt;

  regfile_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // =================================================================== MStage
  typedef struct {
    logic [MST_NREAD-1:0]             v;
    logic [MST_NREAD-1:0][DATA_W-1:0] d;
    int cyc_in, sb_in;
  } mexp_t;
  logic [DATA_W-1:0] m_ref [1 << MREG_W];
  mexp_t m_q [$];
  int m_sb = 0, n_m_conf = 0, n_m_agg = 0, n_m_stall = 0, n_m_out = 0;
  bit m_done = 0;

  function automatic logic [MREG_W-1:0] mrn(int b, int i);
    return {MST_BANK_W'(b), MST_IDX_W'(i)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (mst_stall_back) m_sb <= m_sb + 1;
    if (mst_conflict) n_m_conf++;
    if (mst_aggregated) n_m_agg++;
    if (mst_stall_front) n_m_stall++;
    if (mst_in_valid && mst_in_ready) begin
      mexp_t e;
      for (int w = 0; w < MST_NWRITE; w++) if (mst_wr_v[w]) m_ref[mst_wr_reg[w]] = mst_wr_data[w];
      e.v = mst_rd_v;
      for (int r = 0; r < MST_NREAD; r++) e.d[r] = mst_rd_v[r] ? m_ref[mst_rd_reg[r]] : '0;
      e.cyc_in = cyc + 1;
      e.sb_in  = m_sb + (mst_stall_back ? 1 : 0);
      m_q.push_back(e);
    end
  end

  always @(negedge clk) if (rst_n && mst_out_valid) begin
    mexp_t e;
    n_m_out++;
    check(m_q.size() > 0, "mstage: group out without a group in");
    if (m_q.size() > 0) begin
      e = m_q.pop_front();
      check(mst_out_rd_v == e.v, "mstage: operand valid mask");
      for (int r = 0; r < MST_NREAD; r++) if (e.v[r]) check(mst_out_rd_data[r] == e.d[r], "mstage: operand");
      check(cyc == e.cyc_in + 3 + (m_sb - e.sb_in), "mstage: latency");
    end
  end

  task automatic run_mstage(int ngroups);
    for (int b = 0; b < MST_NBANK; b++)
      for (int i = 0; i < MST_BANK_DEPTH; i += MST_NWRITE) begin
        mst_in_valid = 1; mst_rd_v = '0;
        for (int w = 0; w < MST_NWRITE; w++) begin
          mst_wr_v[w] = (i + w) < MST_BANK_DEPTH;
          mst_wr_reg[w] = mrn(b, i + w);
          mst_wr_data[w] = {$urandom, $urandom};
        end
        @(negedge clk);
        while (!mst_in_ready) @(negedge clk);
      end
    for (int g = 0; g < ngroups; g++) begin
      bit [(1 << MREG_W)-1:0] used;
      used = '0;
      mst_in_valid = $urandom_range(9) != 0;
      for (int w = 0; w < MST_NWRITE; w++) begin
        mst_wr_reg[w] = mrn($urandom_range(MST_NBANK-1), $urandom_range(MST_BANK_DEPTH-1));
        mst_wr_v[w] = $urandom_range(2) != 0 && !used[mst_wr_reg[w]];
        if (mst_wr_v[w]) used[mst_wr_reg[w]] = 1;
        mst_wr_data[w] = {$urandom, $urandom};
      end
      for (int r = 0; r < MST_NREAD; r++) begin
        if (r > 0 && $urandom_range(5) == 0) mst_rd_reg[r] = mst_rd_reg[r-1];
        else if ($urandom_range(7) == 0) mst_rd_reg[r] = mst_wr_reg[0];
        else mst_rd_reg[r] = mrn($urandom_range(MST_NBANK-1), $urandom_range(MST_BANK_DEPTH-1));
        mst_rd_v[r] = $urandom_range(1);
      end
      @(negedge clk);
      while (!mst_in_ready) @(negedge clk);
    end
    mst_in_valid = 0;
    repeat (20) @(negedge clk);
    check(m_q.size() == 0, "mstage: all groups delivered");
  endtask

  // =================================================================== BAIS
  bit             b_valid [BAIS_W];
  bit [1:0]       b_r1 [BAIS_W], b_r2 [BAIS_W];
  bit [BAIS_NBANK-1:0] b_res [BAIS_WB_DIST];
  int n_b_issued = 0, n_b_lost = 0, n_b_busy = 0, n_b_2nd = 0, n_b_bypass = 0;

  function automatic int bbank(logic [BREG_W-1:0] r);
    return int'(r[BREG_W-1 -: BAIS_BANK_W]);
  endfunction

  task automatic run_bais(int ncyc);
    foreach (b_valid[i]) begin b_valid[i] = 0; b_r1[i] = 0; b_r2[i] = 0; end
    foreach (b_res[k]) b_res[k] = '0;
    for (int c = 0; c < ncyc; c++) begin
      bit [BAIS_NBANK-1:0] rb, wb, nres;
      bais_alloc = '0;
      for (int i = 0; i < BAIS_W; i++) begin
        if (!b_valid[i] && $urandom_range(3) == 0) begin
          b_valid[i] = 1; bais_alloc[i] = 1;
          bais_src_v[i] = 2'($urandom_range(3));
          bais_dst_v[i] = $urandom_range(4) != 0;
          bais_src_reg[i][0] = {BAIS_BANK_W'($urandom_range(BAIS_NBANK-1)), BAIS_IDX_W'($urandom)};
          bais_src_reg[i][1] = $urandom_range(3) == 0
                             ? {bais_src_reg[i][0][BREG_W-1 -: BAIS_BANK_W], BAIS_IDX_W'($urandom)}
                             : {BAIS_BANK_W'($urandom_range(BAIS_NBANK-1)), BAIS_IDX_W'($urandom)};
          bais_dst_reg[i] = {BAIS_BANK_W'($urandom_range(BAIS_NBANK-1)), BAIS_IDX_W'($urandom)};
          bais_src_rdy[i] = 2'($urandom_range(3));
        end else if (b_valid[i])
          for (int k = 0; k < 2; k++) if ($urandom_range(2) == 0) bais_src_rdy[i][k] = 1;
        bais_req[i] = b_valid[i] && !bais_alloc[i] && ((bais_src_rdy[i] | ~bais_src_v[i]) == 2'b11);
      end
      #1;
      rb = '0; wb = '0; nres = '0;
      for (int p = 0; p < BAIS_ISSUE; p++) if (bais_issue_v[p]) begin
        int i = bais_issue_idx[p];
        bit [BAIS_NBANK-1:0] mine;
        mine = '0;
        n_b_issued++;
        check(bais_req[i], "bais: issued entry was ready");
        for (int q = 0; q < p; q++) check(!bais_issue_v[q] || bais_issue_idx[q] != bais_issue_idx[p], "bais: distinct entries");
        for (int k = 0; k < 2; k++) if (bais_src_v[i][k] && b_r2[i][k]) mine[bbank(bais_src_reg[i][k])] = 1;
        check((mine & rb) == '0, "bais: read bank shared");
        check((mine & b_res[BAIS_WB_DIST-1]) == '0, "bais: read of a write-reserved bank");
        rb |= mine;
        if (bais_dst_v[i]) begin
          check(!wb[bbank(bais_dst_reg[i])], "bais: write bank shared");
          wb[bbank(bais_dst_reg[i])] = 1;
        end
        if (bais_issue_2nd_read[p]) n_b_2nd++;
      end
      if (bais_lost_bank) n_b_lost++;
      // issued operands woken in the last two cycles: delivered by the bypass, no bank request
      for (int p = 0; p < BAIS_ISSUE; p++) if (bais_issue_v[p])
        for (int k = 0; k < 2; k++)
          if (bais_src_v[bais_issue_idx[p]][k] && !b_r2[bais_issue_idx[p]][k]) n_b_bypass++;
      for (int i = 0; i < BAIS_W; i++)
        if (bais_req[i]) for (int k = 0; k < 2; k++)
          if (bais_src_v[i][k] && b_r2[i][k] && b_res[BAIS_WB_DIST-1][bbank(bais_src_reg[i][k])]) n_b_busy++;
      @(posedge clk);
      for (int k = BAIS_WB_DIST-1; k > 0; k--) b_res[k] = b_res[k-1];
      b_res[0] = wb;
      for (int i = 0; i < BAIS_W; i++) begin
        b_r2[i] = bais_alloc[i] ? bais_src_rdy[i] : b_r1[i];
        b_r1[i] = bais_src_rdy[i];
      end
      for (int p = 0; p < BAIS_ISSUE; p++) if (bais_issue_v[p]) b_valid[bais_issue_idx[p]] = 0;
      @(negedge clk);
    end
    bais_req = '0;
  endtask

  // =================================================================== BAIS register file
  // All registers are written first; then read groups with frequent
  // same-bank operand pairs are offered.  Each group must come back with the
  // written values, two cycles after it was taken plus one cycle per extra
  // register read from its busiest bank.
  typedef struct {
    bit [BRP-1:0]    v;
    bit [DATA_W-1:0] d [BRP];
    int              due;
  } bgrp_t;
  bgrp_t           br_q [$];
  bit [DATA_W-1:0] br_ref [BAIS_NBANK << BAIS_IDX_W];
  int n_br_groups = 0, n_br_second = 0;

  task automatic run_brf(int ncyc);
    for (int x = 0; x < (1 << BAIS_IDX_W); x++)
      for (int b = 0; b < BAIS_NBANK; b += BWP) begin
        for (int j = 0; j < BWP; j++) begin
          brf_wr_v[j] = 1; brf_wr_reg[j] = {BAIS_BANK_W'(b + j), BAIS_IDX_W'(x)};
          brf_wr_data[j] = {$urandom, $urandom};
          br_ref[brf_wr_reg[j]] = brf_wr_data[j];
        end
        @(negedge clk);
      end
    brf_wr_v = '0;
    for (int c = 0; c < ncyc + 10; c++) begin
      int now;
      now = cyc;
      brf_in_valid = c < ncyc && $urandom_range(3) != 0;
      for (int p = 0; p < BRP; p++) begin
        brf_rd_v[p] = $urandom_range(2) != 0;
        if (p > 0 && $urandom_range(2) == 0)
          brf_rd_reg[p] = {brf_rd_reg[p-1][BREG_W-1 -: BAIS_BANK_W], BAIS_IDX_W'($urandom)};
        else
          brf_rd_reg[p] = {BAIS_BANK_W'($urandom_range(BAIS_NBANK-1)), BAIS_IDX_W'($urandom)};
      end
      #1;
      if (brf_second) n_br_second++;
      if (brf_out_valid) begin
        bgrp_t g;
        check(br_q.size() > 0, "bais rf: output without a group");
        if (br_q.size() > 0) begin
          g = br_q.pop_front();
          check(now == g.due, "bais rf: output cycle");
          for (int p = 0; p < BRP; p++) if (g.v[p]) check(brf_out_rd_data[p] == g.d[p], "bais rf: operand");
        end
      end
      @(posedge clk);
      if (brf_in_valid && brf_in_ready) begin
        bgrp_t g;
        int worst;
        worst = 1;
        g.v = brf_rd_v;
        for (int p = 0; p < BRP; p++) begin
          int cnt;
          cnt = 0;
          g.d[p] = br_ref[brf_rd_reg[p]];
          // distinct registers named in this operand's bank
          if (brf_rd_v[p]) for (int q = 0; q < BRP; q++) if (brf_rd_v[q] &&
              brf_rd_reg[q][BREG_W-1 -: BAIS_BANK_W] == brf_rd_reg[p][BREG_W-1 -: BAIS_BANK_W]) begin
            bit first;
            first = 1;
            for (int e = 0; e < q; e++) if (brf_rd_v[e] && brf_rd_reg[e] == brf_rd_reg[q]) first = 0;
            if (first) cnt++;
          end
          if (cnt > worst) worst = cnt;
        end
        g.due = now + 1 + worst;
        br_q.push_back(g);
        n_br_groups++;
      end
      @(negedge clk);
    end
    brf_in_valid = 0;
    check(br_q.size() == 0, "bais rf: all groups delivered");
  endtask

  // =================================================================== NORCS
  typedef struct {
    bit [NRC_NRD-1:0] v;
    bit [NTAG_W-1:0]  r [NRC_NRD];
    bit [DATA_W-1:0]  d [NRC_NRD];
    int               c;
  } ngrp_t;
  ngrp_t       n_q [$];
  bit [DATA_W-1:0] n_ref [NRC_NREGS];
  int          n_recent [$];
  bit          n_st [int];
  int n_n_mrf = 0, n_n_stall = 0, n_n_wbfull = 0, n_n_groups = 0, n_n_conv = 0;

  function automatic bit n_busy(int r);
    foreach (n_q[g]) for (int k = 0; k < NRC_NRD; k++) if (n_q[g].v[k] && n_q[g].r[k] == r) return 1;
    for (int k = 0; k < NRC_NRD; k++) if (nrc_in_valid && nrc_rd_v[k] && nrc_rd_reg[k] == r) return 1;
    return 0;
  endfunction

  task automatic run_norcs(int ncyc);
    for (int a = 0; a < NRC_NREGS; a += NRC_NWR) begin
      for (int j = 0; j < NRC_NWR; j++) begin
        nrc_wr_v[j] = 1; nrc_wr_reg[j] = NTAG_W'(a + j); nrc_wr_data[j] = {$urandom, $urandom};
      end
      #1;
      while (!nrc_wr_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      for (int j = 0; j < NRC_NWR; j++) n_ref[a + j] = nrc_wr_data[j];
      @(negedge clk);
    end
    nrc_wr_v = '0;
    repeat (4) @(negedge clk);
    for (int c = 0; c < ncyc + 10; c++) begin           // last 10 cycles drain
      bit [NRC_NREGS-1:0] taken;
      int now;
      now = cyc;
      nrc_in_valid = c < ncyc && $urandom_range(4) != 0;
      for (int k = 0; k < NRC_NRD; k++) begin
        nrc_rd_v[k] = $urandom_range(4) != 0;
        if (n_recent.size() > 0 && $urandom_range(1))
          nrc_rd_reg[k] = NTAG_W'(n_recent[$urandom_range(n_recent.size()-1)]);
        else nrc_rd_reg[k] = NTAG_W'($urandom_range(NRC_NREGS-1));
      end
      taken = '0;
      for (int j = 0; j < NRC_NWR; j++) begin
        int r, tries;
        tries = 0;
        do begin r = $urandom_range(NRC_NREGS-1); tries++; end
        while ((n_busy(r) || taken[r]) && tries < 100);
        nrc_wr_v[j] = c < ncyc && $urandom_range(2) != 0 && !n_busy(r) && !taken[r];
        taken[r] = 1;
        nrc_wr_reg[j] = NTAG_W'(r); nrc_wr_data[j] = {$urandom, $urandom};
      end
      #1;
      n_st[now] = nrc_stall;
      if (nrc_stall) begin n_n_stall++; check(!nrc_in_ready && !nrc_wr_ready, "norcs: ready low in stall"); end
      if (!nrc_stall && !nrc_wr_ready) n_n_wbfull++;
      n_n_mrf += int'(nrc_miss_cnt);
      if (|dut.u_norcs.conv) n_n_conv++;      // hit turned into a miss by re-allocation
      if (nrc_out_valid) begin
        ngrp_t g;
        check(n_q.size() > 0, "norcs: output without a group");
        if (n_q.size() > 0) begin
          g = n_q.pop_front();
          for (int k = 0; k < NRC_NRD; k++)
            check(nrc_out_rd_data[k] == (g.v[k] ? g.d[k] : '0), "norcs: operand");
          check(now >= g.c + 2 && !n_st[now-1], "norcs: output cycle");
          for (int x = g.c + 1; x < now - 1; x++) check(n_st[x], "norcs: extra cycles are stalls");
        end
      end
      @(posedge clk);
      if (nrc_in_valid && nrc_in_ready) begin
        ngrp_t g;
        g.v = nrc_rd_v; g.c = now;
        for (int k = 0; k < NRC_NRD; k++) begin g.r[k] = nrc_rd_reg[k]; g.d[k] = n_ref[nrc_rd_reg[k]]; end
        n_q.push_back(g);
        n_n_groups++;
      end
      if (nrc_wr_ready)
        for (int j = 0; j < NRC_NWR; j++) if (nrc_wr_v[j]) begin
          n_ref[nrc_wr_reg[j]] = nrc_wr_data[j];
          n_recent.push_back(int'(nrc_wr_reg[j]));
          if (n_recent.size() > 6) void'(n_recent.pop_front());
        end
      @(negedge clk);
    end
    check(n_q.size() == 0, "norcs: all groups delivered");
  endtask

  // =================================================================== main
  initial begin
    mst_in_valid = 0; mst_rd_v = '0; mst_rd_reg = '0; mst_wr_v = '0; mst_wr_reg = '0; mst_wr_data = '0;
    bais_alloc = '0; bais_req = '0; bais_src_v = '0; bais_src_rdy = '0; bais_src_reg = '0;
    bais_dst_v = '0; bais_dst_reg = '0;
    brf_in_valid = 0; brf_rd_v = '0; brf_rd_reg = '0; brf_wr_v = '0; brf_wr_reg = '0; brf_wr_data = '0;
    nrc_in_valid = 0; nrc_rd_v = '0; nrc_rd_reg = '0; nrc_wr_v = '0; nrc_wr_reg = '0; nrc_wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      run_mstage(5000);
      run_bais(5000);
      run_brf(5000);
      run_norcs(5000);
    join
    $display("mstage: groups=%0d carry_over_cycles=%0d aggregation_cycles=%0d stall_cycles=%0d",
             n_m_out, n_m_conf, n_m_agg, n_m_stall);
    $display("bais:   issued=%0d bank_conflict_cycles=%0d busy_bank_requests=%0d second_reads=%0d bypassed_operands=%0d",
             n_b_issued, n_b_lost, n_b_busy, n_b_2nd, n_b_bypass);
    $display("bais rf: groups=%0d extra_read_cycles=%0d", n_br_groups, n_br_second);
    $display("norcs:  groups=%0d mrf_reads=%0d stall_cycles=%0d wb_backpressure_cycles=%0d hit_to_miss_cycles=%0d",
             n_n_groups, n_n_mrf, n_n_stall, n_n_wbfull, n_n_conv);
    check(n_m_conf > 0,   "mstage carry-over happened");
    check(n_m_agg > 0,    "mstage aggregation happened");
    check(n_m_stall > 0,  "mstage stall happened");
    check(n_b_lost > 0,   "bais bank conflict happened");
    check(n_b_busy > 0,   "bais write-reserved bank happened");
    check(n_b_2nd > 0,    "bais second read happened");
    check(n_b_bypass > 0, "bais bypass-delayed operand happened");
    check(n_br_second > 0, "bais rf extra read cycle happened");
    check(n_n_mrf > 0,    "norcs MRF reads happened");
    check(n_n_stall > 0,  "norcs stall happened");
    check(n_n_wbfull > 0, "norcs write-buffer backpressure happened");
    check(n_n_conv > 0,   "norcs hit-to-miss conversion happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
