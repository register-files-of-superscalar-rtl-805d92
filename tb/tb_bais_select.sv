// tb_bais_select: self-checking testbench for bais_select.
//
// A random instruction window drives the DUT every cycle: entries are
// dispatched with random source/destination registers, operands become
// ready at random times (some already ready at dispatch), and issued
// entries leave the window.  A behavioural reference model written
// independently of the RTL keeps its own two-stage ready delay and write
// reservations and predicts issue_v, issue_idx, issue_2nd_read and
// lost_bank.  Independent invariants are checked too: no two issued
// instructions read the same bank, no read goes to a bank reserved for a
// write in that cycle, and no two issued instructions write the same bank.
// The run reports how often bank conflicts, busy banks and second reads
// occurred, and fails if any of them never happened.  Timing: inputs are
// changed at the falling edge, outputs sampled just before the rising edge.
`timescale 1ns/1ps
module tb_bais_select;
  import rf_pkg::*;
  localparam int W = BAIS_W, ISSUE = BAIS_ISSUE, NBANK = BAIS_NBANK;
  localparam int BANK_W = BAIS_BANK_W, IDX_W = BAIS_IDX_W, WB_DIST = BAIS_WB_DIST;
  localparam int REG_W = BANK_W + IDX_W, EI_W = $clog2(W);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0]                 alloc, req, dst_v;
  logic [W-1:0][1:0]            src_v, src_rdy;
  logic [W-1:0][1:0][REG_W-1:0] src_reg;
  logic [W-1:0][REG_W-1:0]      dst_reg;
  logic [ISSUE-1:0]             issue_v, issue_2nd_read;
  logic [ISSUE-1:0][EI_W-1:0]   issue_idx;
  logic                         lost_bank;

  bais_select dut (.*);

  int checks = 0, failures = 0;
  int n_lost = 0, n_busy_block = 0, n_2nd = 0, n_issued = 0, n_dup = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #20_000_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // window contents kept by the testbench
  bit              valid [W];
  // reference model state
  bit [1:0]        m_r1 [W], m_r2 [W];
  bit [NBANK-1:0]  m_wres [WB_DIST];

  function automatic int bank_of(logic [REG_W-1:0] r);
    return int'(r[REG_W-1 -: BANK_W]);
  endfunction

  function automatic logic [REG_W-1:0] rnd_reg();
    return {BANK_W'($urandom_range(NBANK-1)), IDX_W'($urandom)};
  endfunction

  // expected outputs
  bit              e_v [ISSUE];
  int              e_idx [ISSUE];
  bit              e_2nd [ISSUE];
  bit              e_lost;

  task automatic model();
    bit [1:0] rq [W];
    bit taken_r [NBANK], taken_w [NBANK];
    int owner_r [NBANK], owner_w [NBANK];
    bit ok_r [W], ok_w [W];
    bit used [W];
    for (int b = 0; b < NBANK; b++) begin
      taken_r[b] = m_wres[WB_DIST-1][b]; owner_r[b] = -1;
      taken_w[b] = 0; owner_w[b] = -1;
    end
    // per-bank arbiters: walk the entries in priority order
    for (int i = 0; i < W; i++) begin
      rq[i][0] = src_v[i][0] && m_r2[i][0];
      rq[i][1] = src_v[i][1] && m_r2[i][1];
      ok_r[i] = 1; ok_w[i] = 1;
      if (!req[i]) continue;
      for (int k = 0; k < 2; k++) if (rq[i][k]) begin
        int b = bank_of(src_reg[i][k]);
        if (owner_r[b] == i) continue;
        if (!taken_r[b]) begin taken_r[b] = 1; owner_r[b] = i; end
        else ok_r[i] = 0;
      end
      if (dst_v[i]) begin
        int b = bank_of(dst_reg[i]);
        if (!taken_w[b]) begin taken_w[b] = 1; owner_w[b] = i; end
        else ok_w[i] = 0;
      end
    end
    // ISSUE oldest-first picks, then the AND with the bank grants
    foreach (used[i]) used[i] = 0;
    e_lost = 0;
    for (int p = 0; p < ISSUE; p++) begin
      int pick = -1;
      for (int i = 0; i < W; i++) if (req[i] && !used[i]) begin pick = i; break; end
      e_v[p] = 0; e_idx[p] = 0; e_2nd[p] = 0;
      if (pick >= 0) begin
        used[pick] = 1;
        e_idx[p] = pick;
        e_v[p] = ok_r[pick] && ok_w[pick];
        if (!e_v[p]) e_lost = 1;
        e_2nd[p] = e_v[p] && rq[pick] == 2'b11 &&
                   bank_of(src_reg[pick][0]) == bank_of(src_reg[pick][1]) &&
                   src_reg[pick][0] != src_reg[pick][1];
        if (!ok_r[pick]) begin
          for (int k = 0; k < 2; k++)
            if (rq[pick][k] && m_wres[WB_DIST-1][bank_of(src_reg[pick][k])]) n_busy_block++;
        end
      end
    end
  endtask

  task automatic model_clock();
    bit [NBANK-1:0] nw = '0;
    for (int p = 0; p < ISSUE; p++)
      if (e_v[p] && dst_v[e_idx[p]]) nw[bank_of(dst_reg[e_idx[p]])] = 1;
    for (int k = WB_DIST-1; k > 0; k--) m_wres[k] = m_wres[k-1];
    m_wres[0] = nw;
    for (int i = 0; i < W; i++) begin
      m_r2[i] = alloc[i] ? src_rdy[i] : m_r1[i];
      m_r1[i] = src_rdy[i];
    end
  endtask

  // invariants on the DUT's own outputs
  task automatic invariants();
    bit [NBANK-1:0] rb = '0, wb = '0;
    for (int p = 0; p < ISSUE; p++) if (issue_v[p]) begin
      int i = issue_idx[p];
      bit [NBANK-1:0] mine = '0;
      check(req[i] == 1'b1, "issued entry not ready");
      for (int k = 0; k < 2; k++)
        if (src_v[i][k] && m_r2[i][k]) mine[bank_of(src_reg[i][k])] = 1;
      check((mine & rb) == '0, "two instructions read one bank");
      check((mine & m_wres[WB_DIST-1]) == '0, "read of a write-reserved bank");
      rb |= mine;
      if (dst_v[i]) begin
        check(!wb[bank_of(dst_reg[i])], "two instructions write one bank");
        wb[bank_of(dst_reg[i])] = 1;
      end
      if (src_v[i] == 2'b11 && m_r2[i] == 2'b11 && src_reg[i][0] == src_reg[i][1]) n_dup++;
    end
  endtask

  initial begin
    alloc = '0; req = '0; src_v = '0; src_rdy = '0; src_reg = '0; dst_v = '0; dst_reg = '0;
    foreach (valid[i]) begin valid[i] = 0; m_r1[i] = 0; m_r2[i] = 0; end
    foreach (m_wres[k]) m_wres[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      // drive the window at the falling edge
      alloc = '0;
      for (int i = 0; i < W; i++) begin
        if (!valid[i] && $urandom_range(3) == 0) begin
          valid[i]   = 1;
          alloc[i]   = 1;
          src_v[i]   = 2'($urandom_range(3));
          dst_v[i]   = $urandom_range(4) != 0;
          src_reg[i][0] = rnd_reg();
          // force some same-register and same-bank pairs
          case ($urandom_range(5))
            0: src_reg[i][1] = src_reg[i][0];
            1: src_reg[i][1] = {src_reg[i][0][REG_W-1 -: BANK_W], IDX_W'($urandom)};
            default: src_reg[i][1] = rnd_reg();
          endcase
          dst_reg[i] = rnd_reg();
          src_rdy[i] = 2'($urandom_range(3));
        end else if (valid[i]) begin
          for (int k = 0; k < 2; k++)
            if ($urandom_range(2) == 0) src_rdy[i][k] = 1;
        end
        req[i] = valid[i] && ((src_rdy[i] | ~src_v[i]) == 2'b11) && !alloc[i];
      end
      #1;
      model();
      invariants();
      for (int p = 0; p < ISSUE; p++) begin
        check(issue_v[p] == e_v[p], $sformatf("issue_v[%0d]", p));
        if (e_v[p]) begin
          check(int'(issue_idx[p]) == e_idx[p], $sformatf("issue_idx[%0d]", p));
          check(issue_2nd_read[p] == e_2nd[p], $sformatf("issue_2nd_read[%0d]", p));
        end
        if (issue_v[p]) n_issued++;
        if (e_2nd[p]) n_2nd++;
      end
      check(lost_bank == e_lost, "lost_bank");
      if (e_lost) n_lost++;
      @(posedge clk);
      model_clock();
      for (int p = 0; p < ISSUE; p++) if (issue_v[p]) valid[issue_idx[p]] = 0;
      @(negedge clk);
    end

    $display("issued=%0d lost_bank_cycles=%0d busy_blocked=%0d second_reads=%0d same_reg_pairs=%0d",
             n_issued, n_lost, n_busy_block, n_2nd, n_dup);
    check(n_lost > 0, "bank conflicts exercised");
    check(n_busy_block > 0, "write-reserved banks exercised");
    check(n_2nd > 0, "second reads exercised");
    check(n_dup > 0, "same-register pairs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
