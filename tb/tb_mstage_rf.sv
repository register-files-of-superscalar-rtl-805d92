// tb_mstage_rf: self-checking testbench of the MStage register file.
//
// Part 1 replays the cycle-by-cycle example of the skewed pipeline on a
// small instance (2 read ports): instructions I1..I5 all access bank 0
// (I1: 2 reads, I2: none, I3: 2, I4: 1, I5: 2).  Counting the cycle in
// which I1 sits in rn1 as C1, the operands must reach the execution stage
// in C4 (I1), C5 (I2), C6 (I3), C7 (I4) and, after a one-cycle stall in
// C8, in C9 (I5).  The stall must be seen on the data side in C8 only.
//
// Part 2 drives the default-size instance (10 read + 5 write ports,
// 18 banks) with random groups and compares every delivered operand with a
// reference register array.  Reads see all writes of earlier groups and
// the writes of their own group (aggregation through the bank port).  The
// delivery cycle of each group is checked: 3 cycles after entry plus the
// data-side stall cycles in between.  Carry-overs, aggregation and stalls
// must each have happened.
module tb_mstage_rf;
  import rf_pkg::*;
  localparam int REG_W = MST_BANK_W + MST_IDX_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- part 1 DUT
  logic s_in_valid, s_in_ready, s_out_valid;
  logic [1:0] s_rd_v, s_out_rd_v;
  logic [1:0][REG_W-1:0] s_rd_reg;
  logic [0:0] s_wr_v;
  logic [0:0][REG_W-1:0] s_wr_reg;
  logic [0:0][63:0] s_wr_data;
  logic [1:0][63:0] s_out_data;
  logic s_sf, s_sb, s_cf, s_ag;

  mstage_rf #(.NREAD(2), .NWRITE(1)) u_small (
    .clk(clk), .rst_n(rst_n), .in_valid(s_in_valid), .in_ready(s_in_ready),
    .rd_v(s_rd_v), .rd_reg(s_rd_reg), .wr_v(s_wr_v), .wr_reg(s_wr_reg), .wr_data(s_wr_data),
    .out_valid(s_out_valid), .out_rd_v(s_out_rd_v), .out_rd_data(s_out_data),
    .stall_front(s_sf), .stall_back(s_sb), .conflict(s_cf), .aggregated(s_ag));

  // ---------------------------------------------------------------- part 2 DUT
  logic b_in_valid, b_in_ready, b_out_valid;
  logic [MST_NREAD-1:0] b_rd_v, b_out_rd_v;
  logic [MST_NREAD-1:0][REG_W-1:0] b_rd_reg;
  logic [MST_NWRITE-1:0] b_wr_v;
  logic [MST_NWRITE-1:0][REG_W-1:0] b_wr_reg;
  logic [MST_NWRITE-1:0][63:0] b_wr_data;
  logic [MST_NREAD-1:0][63:0] b_out_data;
  logic b_sf, b_sb, b_cf, b_ag;

  mstage_rf u_big (
    .clk(clk), .rst_n(rst_n), .in_valid(b_in_valid), .in_ready(b_in_ready),
    .rd_v(b_rd_v), .rd_reg(b_rd_reg), .wr_v(b_wr_v), .wr_reg(b_wr_reg), .wr_data(b_wr_data),
    .out_valid(b_out_valid), .out_rd_v(b_out_rd_v), .out_rd_data(b_out_data),
    .stall_front(b_sf), .stall_back(b_sb), .conflict(b_cf), .aggregated(b_ag));

  function automatic logic [REG_W-1:0] rn(int bank, int idx);
    return {MST_BANK_W'(bank), MST_IDX_W'(idx)};
  endfunction

  // ---------------------------------------------------------------- part 1
  int s_out_cyc[$];
  logic [1:0][63:0] s_out_val[$];
  int s_sb_cyc[$];
  always @(negedge clk) if (rst_n) begin
    if (s_out_valid) begin s_out_cyc.push_back(cyc); s_out_val.push_back(s_out_data); end
    if (s_sb) s_sb_cyc.push_back(cyc);
  end

  task automatic small_group(input bit v, input bit r0, input int i0, input bit r1, input int i1);
    s_in_valid = v;
    s_rd_v     = {r1, r0};
    s_rd_reg[0] = rn(0, i0);
    s_rd_reg[1] = rn(0, i1);
    s_wr_v     = '0;
    @(negedge clk);
    while (!s_in_ready) @(negedge clk);
  endtask

  task automatic part1();
    int c1;
    // preload bank 0 entries 0..9 with 1000+i
    for (int i = 0; i < MST_BANK_DEPTH; i++) begin
      s_in_valid = 1'b1; s_rd_v = '0; s_wr_v = 1'b1;
      s_wr_reg[0] = rn(0, i); s_wr_data[0] = 64'(1000 + i);
      @(negedge clk);
    end
    s_in_valid = 1'b0; s_wr_v = '0;
    repeat (6) @(negedge clk);
    s_out_cyc.delete(); s_out_val.delete(); s_sb_cyc.delete();
    c1 = cyc + 1;                        // I1 is in rn1 in the next cycle
    small_group(1, 1, 1, 1, 2);          // I1: two reads, bank 0
    small_group(1, 0, 0, 0, 0);          // I2: no source operands
    small_group(1, 1, 3, 1, 4);          // I3
    small_group(1, 1, 5, 0, 0);          // I4
    small_group(1, 1, 6, 1, 7);          // I5
    s_in_valid = 1'b0; s_rd_v = '0;
    repeat (10) @(negedge clk);
    check(s_out_cyc.size() == 5, $sformatf("fig: 5 groups delivered (got %0d)", s_out_cyc.size()));
    if (s_out_cyc.size() == 5) begin
      check(s_out_cyc[0] - c1 + 1 == 4, $sformatf("fig: I1 in exec at C4 (C%0d)", s_out_cyc[0] - c1 + 1));
      check(s_out_cyc[1] - c1 + 1 == 5, $sformatf("fig: I2 at C5 (C%0d)", s_out_cyc[1] - c1 + 1));
      check(s_out_cyc[2] - c1 + 1 == 6, $sformatf("fig: I3 at C6 (C%0d)", s_out_cyc[2] - c1 + 1));
      check(s_out_cyc[3] - c1 + 1 == 7, $sformatf("fig: I4 at C7 (C%0d)", s_out_cyc[3] - c1 + 1));
      check(s_out_cyc[4] - c1 + 1 == 9, $sformatf("fig: I5 at C9 (C%0d)", s_out_cyc[4] - c1 + 1));
      check(s_out_val[0][0] == 1001 && s_out_val[0][1] == 1002, "fig: I1 operands");
      check(s_out_val[2][0] == 1003 && s_out_val[2][1] == 1004, "fig: I3 operands");
      check(s_out_val[3][0] == 1005, "fig: I4 operand");
      check(s_out_val[4][0] == 1006 && s_out_val[4][1] == 1007, "fig: I5 operands");
    end
    check(s_sb_cyc.size() == 1 && s_sb_cyc[0] - c1 + 1 == 8, "fig: single data-side stall in C8");
  endtask

  // ---------------------------------------------------------------- part 2
  logic [63:0] refm [MST_NBANK * 16];
  typedef struct {
    logic [MST_NREAD-1:0] v;
    logic [MST_NREAD-1:0][63:0] d;
    int cyc_in;
    int sb_in;
  } exp_t;
  exp_t expq[$];
  int sb_total = 0;
  int n_conf = 0, n_agg = 0, n_stall = 0, n_out = 0;

  always @(posedge clk) if (rst_n) begin
    if (b_sb) sb_total <= sb_total + 1;
    if (b_cf) n_conf++;
    if (b_ag) n_agg++;
    if (b_sf) n_stall++;
  end

  // accept a group at the clock edge: update reference and queue expected values
  always @(posedge clk) if (rst_n && b_in_valid && b_in_ready) begin
    exp_t e;
    for (int w = 0; w < MST_NWRITE; w++)
      if (b_wr_v[w]) refm[b_wr_reg[w]] = b_wr_data[w];
    e.v = b_rd_v;
    for (int r = 0; r < MST_NREAD; r++) begin
      e.d[r] = b_rd_v[r] ? refm[b_rd_reg[r]] : 64'd0;
    end
    e.cyc_in = cyc + 1;       // in rn1 from the next cycle
    e.sb_in  = sb_total + (b_sb ? 1 : 0);
    expq.push_back(e);
  end

  always @(negedge clk) if (rst_n && b_out_valid) begin
    exp_t e;
    n_out++;
    if (expq.size() == 0) check(0, "unexpected group out");
    else begin
      e = expq.pop_front();
      check(b_out_rd_v == e.v, $sformatf("operand valid mask %b exp %b", b_out_rd_v, e.v));
      for (int r = 0; r < MST_NREAD; r++)
        if (e.v[r]) check(b_out_data[r] == e.d[r],
          $sformatf("port %0d data %h exp %h", r, b_out_data[r], e.d[r]));
      check(cyc == e.cyc_in + 3 + (sb_total - e.sb_in),
        $sformatf("latency: out %0d in %0d stalls %0d", cyc, e.cyc_in, sb_total - e.sb_in));
    end
  end

  task automatic part2(input int ngroups);
    int used [int];
    // preload all 180 registers
    for (int b = 0; b < MST_NBANK; b++)
      for (int i = 0; i < MST_BANK_DEPTH; i += MST_NWRITE) begin
        b_in_valid = 1'b1; b_rd_v = '0;
        for (int w = 0; w < MST_NWRITE; w++) begin
          b_wr_v[w] = (i + w) < MST_BANK_DEPTH;
          b_wr_reg[w] = rn(b, i + w);
          b_wr_data[w] = {32'(b), 32'(i + w)} ^ 64'h5a5a_0000_0000_0000;
        end
        @(negedge clk);
        while (!b_in_ready) @(negedge clk);
      end
    // random traffic
    for (int g = 0; g < ngroups; g++) begin
      used.delete();
      b_in_valid = ($urandom_range(0, 9) != 0);
      for (int w = 0; w < MST_NWRITE; w++) begin
        int b, i;
        b = $urandom_range(0, MST_NBANK - 1);
        i = $urandom_range(0, MST_BANK_DEPTH - 1);
        b_wr_reg[w]  = rn(b, i);
        b_wr_v[w]    = ($urandom_range(0, 2) != 0) && !used.exists(int'(rn(b, i)));
        if (b_wr_v[w]) used[int'(rn(b, i))] = 1;
        b_wr_data[w] = {$urandom, $urandom};
      end
      for (int r = 0; r < MST_NREAD; r++) begin
        int b, i;
        if (r > 0 && $urandom_range(0, 5) == 0) b_rd_reg[r] = b_rd_reg[r-1];      // same register
        else if ($urandom_range(0, 7) == 0) b_rd_reg[r] = b_wr_reg[0];            // read of a write
        else begin
          b = $urandom_range(0, MST_NBANK - 1);
          i = $urandom_range(0, MST_BANK_DEPTH - 1);
          b_rd_reg[r] = rn(b, i);
        end
        b_rd_v[r] = ($urandom_range(0, 1) != 0);
      end
      @(negedge clk);
      while (!b_in_ready) @(negedge clk);
    end
    b_in_valid = 1'b0;
    repeat (20) @(negedge clk);
    check(expq.size() == 0, $sformatf("all groups delivered (%0d left)", expq.size()));
  endtask

  initial begin
    s_in_valid = 0; s_rd_v = '0; s_wr_v = '0; s_rd_reg = '0; s_wr_reg = '0; s_wr_data = '0;
    b_in_valid = 0; b_rd_v = '0; b_wr_v = '0; b_rd_reg = '0; b_wr_reg = '0; b_wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    part1();
    part2(3000);
    check(n_conf > 0,  "carry-over to the second stage happened");
    check(n_agg > 0,   "request aggregation happened");
    check(n_stall > 0, "stall happened");
    $display("mstage: groups %0d, carry-over cycles %0d, aggregation cycles %0d, stall cycles %0d",
      n_out, n_conf, n_agg, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
