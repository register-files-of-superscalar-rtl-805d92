// tb_norcs_rf: self-checking testbench for the NORCS register cache system.
//
// All 128 registers are first written through the result ports (checking
// wr_ready).  Then, every cycle, the testbench offers an issue group of 8
// source operands (half of them drawn from recently written registers so
// the register cache hits, the rest random so it misses) and up to 4
// results.  Results never target a register read by a group that is
// offered or still in flight, as register renaming guarantees in a core.
// A reference model of the register values takes a snapshot of the
// expected operands when a group is accepted; when out_valid rises the
// delivered operands are compared with the snapshot (0 for unused
// operands).  Timing is checked too: a group accepted in cycle t must come
// out in cycle t+2+s where the s cycles in between all show stall, and
// in_ready/wr_ready must be low while stalled.  The run reports groups,
// MRF reads, stall cycles and write-buffer backpressure cycles, and fails
// if stalls or backpressure never happened.
//
// A second, 1-issue instance (2 operands, one MRF read port) first replays
// the pipeline example of the NORCS description: an instruction with one
// missing operand flows without a stall, an instruction with no operands
// follows, and an instruction whose two operands both miss stalls for
// exactly one cycle; the output cycles (t+2, t+3, t+5) and values are
// checked.
`timescale 1ns/1ps
module tb_norcs_rf;
  import rf_pkg::*;
  localparam int NRD = NRC_NRD, NWR = NRC_NWR, NREGS = NRC_NREGS, DW = DATA_W;
  localparam int TAG_W = $clog2(NREGS), MCW = $clog2(NRD + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic                      in_valid, in_ready, wr_ready, out_valid, stall;
  logic [NRD-1:0]            rd_v;
  logic [NRD-1:0][TAG_W-1:0] rd_reg;
  logic [NWR-1:0]            wr_v;
  logic [NWR-1:0][TAG_W-1:0] wr_reg;
  logic [NWR-1:0][DW-1:0]    wr_data;
  logic [NRD-1:0][DW-1:0]    out_rd_data;
  logic [MCW-1:0]            miss_cnt;

  norcs_rf dut (.*);

  // 1-issue instance for the directed pipeline example
  logic                 s_in_valid, s_in_ready, s_wr_ready, s_out_valid, s_stall;
  logic [1:0]           s_rd_v;
  logic [1:0][TAG_W-1:0] s_rd_reg;
  logic [0:0]           s_wr_v;
  logic [0:0][TAG_W-1:0] s_wr_reg;
  logic [0:0][DW-1:0]   s_wr_data;
  logic [1:0][DW-1:0]   s_out_rd_data;
  logic [1:0]           s_miss_cnt;

  norcs_rf #(.NRD(2), .NWR(1), .MRF_RP(1), .MRF_WP(1)) u_small (
    .clk, .rst_n, .in_valid(s_in_valid), .in_ready(s_in_ready), .rd_v(s_rd_v), .rd_reg(s_rd_reg),
    .wr_v(s_wr_v), .wr_reg(s_wr_reg), .wr_data(s_wr_data), .wr_ready(s_wr_ready),
    .out_valid(s_out_valid), .out_rd_data(s_out_rd_data), .stall(s_stall), .miss_cnt(s_miss_cnt));

  int s_cyc = 0;
  always @(posedge clk) s_cyc <= s_cyc + 1;
  int s_out_at [$];
  logic [1:0][DW-1:0] s_out_val [$];
  int s_stalls = 0;
  always @(negedge clk) if (rst_n) begin
    if (s_out_valid) begin s_out_at.push_back(s_cyc); s_out_val.push_back(s_out_rd_data); end
    if (s_stall) s_stalls++;
  end

  function automatic logic [DW-1:0] sval(int r);
    return 64'h1000 + 64'(r);
  endfunction

  task automatic example();
    int c0;
    s_in_valid = 0; s_rd_v = '0; s_rd_reg = '0;
    // registers 10 and 11 first, then 8 more results evict them from the cache
    for (int i = 0; i < 10; i++) begin
      int r;
      r = (i < 2) ? 10 + i : 18 + i;
      s_wr_v = 1; s_wr_reg[0] = TAG_W'(r); s_wr_data[0] = sval(r);
      #1;
      while (!s_wr_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    s_wr_v = 0;
    repeat (8) @(negedge clk);
    s_out_at.delete(); s_out_val.delete(); s_stalls = 0;
    c0 = s_cyc;
    // I1: first operand hits (register 27, just written), second misses (10)
    s_in_valid = 1; s_rd_v = 2'b11; s_rd_reg[0] = TAG_W'(27); s_rd_reg[1] = TAG_W'(10);
    @(negedge clk);
    // I2: no source operands
    s_rd_v = 2'b00;
    @(negedge clk);
    // I3: both operands miss (10 and 11)
    s_rd_v = 2'b11; s_rd_reg[0] = TAG_W'(10); s_rd_reg[1] = TAG_W'(11);
    @(negedge clk);
    s_in_valid = 0; s_rd_v = '0;
    repeat (6) @(negedge clk);
    check(s_out_at.size() == 3, "example: three instructions delivered");
    if (s_out_at.size() == 3) begin
      check(s_out_at[0] - c0 == 2, $sformatf("example: I1 after 2 cycles (%0d)", s_out_at[0] - c0));
      check(s_out_at[1] - c0 == 3, $sformatf("example: I2 after 3 cycles (%0d)", s_out_at[1] - c0));
      check(s_out_at[2] - c0 == 5, $sformatf("example: I3 after 5 cycles (%0d)", s_out_at[2] - c0));
      check(s_out_val[0][0] == sval(27) && s_out_val[0][1] == sval(10), "example: I1 operands");
      check(s_out_val[1] == '0, "example: I2 has no operands");
      check(s_out_val[2][0] == sval(10) && s_out_val[2][1] == sval(11), "example: I3 operands");
    end
    check(s_stalls == 1, $sformatf("example: exactly one stall cycle (%0d)", s_stalls));
  endtask

  int checks = 0, failures = 0;
  int n_groups = 0, n_mrf = 0, n_stall = 0, n_wbfull = 0, n_ops = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #20_000_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  typedef struct {
    bit [NRD-1:0]        v;
    bit [TAG_W-1:0]      r [NRD];
    bit [DW-1:0]         d [NRD];
    int                  cyc;
  } grp_t;
  grp_t        inflight [$];
  bit [DW-1:0] m [NREGS];
  int          recent [$];
  bit          stall_hist [int];
  int          cyc = 0;

  function automatic bit busy_reg(int r);
    foreach (inflight[g])
      for (int k = 0; k < NRD; k++) if (inflight[g].v[k] && inflight[g].r[k] == r) return 1;
    for (int k = 0; k < NRD; k++) if (in_valid && rd_v[k] && rd_reg[k] == r) return 1;
    return 0;
  endfunction

  initial begin
    in_valid = 0; rd_v = '0; rd_reg = '0; wr_v = '0; wr_reg = '0; wr_data = '0;
    s_in_valid = 0; s_rd_v = '0; s_rd_reg = '0; s_wr_v = '0; s_wr_reg = '0; s_wr_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    example();
    // preload every register
    for (int a = 0; a < NREGS; a += NWR) begin
      for (int j = 0; j < NWR; j++) begin
        wr_v[j] = 1; wr_reg[j] = TAG_W'(a + j); wr_data[j] = {$urandom, $urandom};
      end
      #1;
      while (!wr_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      for (int j = 0; j < NWR; j++) m[a + j] = wr_data[j];
      @(negedge clk);
    end
    wr_v = '0;
    repeat (4) @(negedge clk);

    for (cyc = 0; cyc < 20000; cyc++) begin
      bit [NREGS-1:0] taken;
      // issue group
      in_valid = $urandom_range(4) != 0;
      for (int k = 0; k < NRD; k++) begin
        rd_v[k] = $urandom_range(4) != 0;
        if (recent.size() > 0 && $urandom_range(1)) rd_reg[k] = TAG_W'(recent[$urandom_range(recent.size()-1)]);
        else rd_reg[k] = TAG_W'($urandom_range(NREGS-1));
      end
      // results, avoiding registers being read
      taken = '0;
      for (int j = 0; j < NWR; j++) begin
        int r, tries;
        wr_v[j] = $urandom_range(2) != 0;
        tries = 0;
        do begin r = $urandom_range(NREGS-1); tries++; end
        while ((busy_reg(r) || taken[r]) && tries < 100);
        if (busy_reg(r) || taken[r]) wr_v[j] = 0;
        taken[r] = 1;
        wr_reg[j] = TAG_W'(r); wr_data[j] = {$urandom, $urandom};
      end
      #1;
      // outputs of this cycle
      stall_hist[cyc] = stall;
      if (stall) begin
        n_stall++;
        check(!in_ready && !wr_ready, "ready low while stalled");
      end
      if (!stall && !wr_ready) n_wbfull++;
      n_mrf += int'(miss_cnt);
      if (out_valid) begin
        check(inflight.size() > 0, "out_valid without a group");
        if (inflight.size() > 0) begin
          grp_t g;
          g = inflight.pop_front();
          for (int k = 0; k < NRD; k++)
            check(out_rd_data[k] == (g.v[k] ? g.d[k] : '0), $sformatf("operand %0d of group from cycle %0d", k, g.cyc));
          check(cyc >= g.cyc + 2 && !stall_hist[cyc-1], "output cycle");
          for (int c = g.cyc + 1; c < cyc - 1; c++) check(stall_hist[c], "extra cycles are stall cycles");
        end
      end
      @(posedge clk);
      if (in_valid && in_ready) begin
        grp_t g;
        g.v = rd_v; g.cyc = cyc;
        for (int k = 0; k < NRD; k++) begin
          g.r[k] = rd_reg[k];
          g.d[k] = m[rd_reg[k]];
          if (rd_v[k]) n_ops++;
        end
        inflight.push_back(g);
        n_groups++;
      end
      if (wr_ready)
        for (int j = 0; j < NWR; j++) if (wr_v[j]) begin
          m[wr_reg[j]] = wr_data[j];
          recent.push_back(int'(wr_reg[j]));
          if (recent.size() > 6) void'(recent.pop_front());
        end
      @(negedge clk);
    end
    $display("groups=%0d operands=%0d mrf_reads=%0d stall_cycles=%0d wb_backpressure_cycles=%0d",
             n_groups, n_ops, n_mrf, n_stall, n_wbfull);
    check(n_stall > 0 && n_wbfull > 0 && n_groups > 1000, "stalls and backpressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
