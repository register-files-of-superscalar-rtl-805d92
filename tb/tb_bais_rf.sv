// tb_bais_rf: self-checking testbench for bais_rf.
//
// Read groups with random operand registers are offered at random times
// while random writes go to the banks.  The operand registers are chosen to
// make same-register pairs (one bank access) and same-bank different-
// register pairs (an extra read cycle) frequent.  A reference model keeps
// its own copy of the register contents and predicts, for every group, the
// data of each valid read port and the cycle it arrives in: two cycles
// after acceptance plus one cycle per extra bank access (the largest number
// of different registers the group names in one bank, minus one), plus one
// for each cycle a write takes a bank the group still needs.  Writes never
// target a register of a group in flight, as the scheduler guarantees.  It
// reports the numbers of extra read cycles and write-blocked cycles and
// fails if either never happened.  Inputs change at the falling edge.
`timescale 1ns/1ps
module tb_bais_rf;
  import rf_pkg::*;
  localparam int NBANK = BAIS_NBANK, BANK_W = BAIS_BANK_W, IDX_W = BAIS_IDX_W;
  localparam int NRP = 2 * BAIS_ISSUE, NWP = BAIS_ISSUE, DW = DATA_W;
  localparam int REG_W = BANK_W + IDX_W, NREG = NBANK << IDX_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                      in_valid, in_ready, out_valid, second;
  logic [NRP-1:0]            rd_v;
  logic [NRP-1:0][REG_W-1:0] rd_reg;
  logic [NWP-1:0]            wr_v;
  logic [NWP-1:0][REG_W-1:0] wr_reg;
  logic [NWP-1:0][DW-1:0]    wr_data;
  logic [NRP-1:0][DW-1:0]    out_rd_data;

  bais_rf dut (.*);

  int checks = 0, failures = 0, n_second = 0, n_wblock = 0, n_groups = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic [DW-1:0] m [NREG];
  typedef struct {
    bit [NRP-1:0]        v;
    logic [REG_W-1:0]    r [NRP];
    logic [DW-1:0]       d [NRP];
    bit [NRP-1:0]        pend;
  } grp_t;
  grp_t cur;            // group in the read stage
  bit   cur_v;
  grp_t outq [$];       // group expected at the output

  function automatic int bank_of(logic [REG_W-1:0] r);
    return int'(r[REG_W-1 -: BANK_W]);
  endfunction

  initial begin
    in_valid = 0; rd_v = '0; rd_reg = '0; wr_v = '0; wr_reg = '0; wr_data = '0;
    cur_v = 0;
    foreach (m[i]) m[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // clear the banks so the model starts equal
    for (int x = 0; x < (1 << IDX_W); x++)
      for (int b = 0; b < NBANK; b += NWP) begin
        for (int j = 0; j < NWP; j++) begin
          wr_v[j] = (b + j) < NBANK;
          wr_reg[j] = {BANK_W'(b + j), IDX_W'(x)}; wr_data[j] = '0;
        end
        @(negedge clk);
      end
    wr_v = '0;
    @(negedge clk);

    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit [NBANK-1:0] wb;
      bit [NBANK-1:0] cur_b;
      // offer a new group
      in_valid = $urandom_range(3) != 0;
      for (int p = 0; p < NRP; p++) begin
        rd_v[p] = $urandom_range(2) != 0;
        case ($urandom_range(3))
          0: rd_reg[p] = (p > 0) ? rd_reg[p-1] : REG_W'(0);
          1: rd_reg[p] = (p > 0) ? {rd_reg[p-1][REG_W-1 -: BANK_W], IDX_W'($urandom)}
                                 : {BANK_W'($urandom_range(NBANK-1)), IDX_W'($urandom)};
          default: rd_reg[p] = {BANK_W'($urandom_range(NBANK-1)), IDX_W'($urandom)};
        endcase
      end
      // banks the group in the read stage still needs
      cur_b = '0;
      if (cur_v) for (int p = 0; p < NRP; p++) if (cur.pend[p]) cur_b[bank_of(cur.r[p])] = 1;
      // writes: one per bank, never to a register of a group in flight or offered
      wb = '0;
      for (int j = 0; j < NWP; j++) begin
        logic [REG_W-1:0] r;
        bit ok;
        wr_v[j] = 0;
        r = {BANK_W'($urandom_range(NBANK-1)), IDX_W'($urandom)};
        ok = !wb[bank_of(r)] && $urandom_range(2) == 0;
        if (cur_v) for (int p = 0; p < NRP; p++) if (cur.v[p] && cur.r[p] == r) ok = 0;
        for (int p = 0; p < NRP; p++) if (rd_v[p] && rd_reg[p] == r) ok = 0;
        // keep write blocking rare so the read stage keeps moving
        if (cur_b[bank_of(r)] && $urandom_range(3) != 0) ok = 0;
        if (ok) begin
          wr_v[j] = 1; wr_reg[j] = r; wr_data[j] = {$urandom, $urandom};
          wb[bank_of(r)] = 1;
        end
      end
      #1;
      // ---- model of the read stage in this cycle
      if (cur_v) begin
        bit [NBANK-1:0] taken;
        logic [REG_W-1:0] leader [NBANK];
        bit [NRP-1:0] sv;
        taken = wb;
        if ((cur_b & wb) != '0) n_wblock++;
        for (int p = 0; p < NRP; p++) if (cur.pend[p] && !taken[bank_of(cur.r[p])]) begin
          taken[bank_of(cur.r[p])] = 1; leader[bank_of(cur.r[p])] = cur.r[p];
        end
        sv = '0;
        for (int p = 0; p < NRP; p++)
          if (cur.pend[p] && !wb[bank_of(cur.r[p])] && leader[bank_of(cur.r[p])] == cur.r[p]) sv[p] = 1;
        cur.pend &= ~sv;
        check(second == (cur.pend != '0), "second");
        check(in_ready == (cur.pend == '0), "in_ready while busy");
        if (cur.pend != '0) n_second++;
      end else begin
        check(in_ready == 1'b1, "in_ready when idle");
        check(second == 1'b0, "second when idle");
      end
      @(posedge clk);
      // ---- output of the group that finished its reads in this cycle
      #1;
      if (cur_v && cur.pend == '0) begin outq.push_back(cur); cur_v = 0; n_groups++; end
      if (outq.size() != 0) begin
        grp_t g;
        g = outq.pop_front();
        check(out_valid == 1'b1, "out_valid");
        for (int p = 0; p < NRP; p++) if (g.v[p])
          check(out_rd_data[p] == g.d[p], $sformatf("read port %0d data", p));
      end else check(out_valid == 1'b0, "no out_valid");
      // the model's register contents take this cycle's writes
      for (int j = 0; j < NWP; j++) if (wr_v[j]) m[wr_reg[j]] = wr_data[j];
      // stage update
      if (!cur_v && in_valid) begin
        grp_t g;
        g.v = rd_v; g.pend = rd_v;
        for (int p = 0; p < NRP; p++) begin g.r[p] = rd_reg[p]; g.d[p] = m[rd_reg[p]]; end
        cur = g; cur_v = 1;
      end
      @(negedge clk);
    end

    $display("groups=%0d extra_read_cycles=%0d write_blocked_cycles=%0d", n_groups, n_second, n_wblock);
    check(n_second > 0, "extra read cycles exercised");
    check(n_wblock > 0, "write-blocked reads exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
