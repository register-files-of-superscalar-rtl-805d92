// tb_norcs_wb: self-checking testbench for the NORCS write buffer.
// A queue models the buffer.  Each cycle, when in_ready is high, a random
// set of results is offered (in_ready is also checked against the model's
// occupancy).  Before the clock edge the drain outputs must show the oldest
// entries and each search must return the youngest matching entry; at the
// edge the model drops the drained entries and appends the new ones.
// Cycles with the buffer too full to accept are counted.
`timescale 1ns/1ps
module tb_norcs_wb;
  import rf_pkg::*;
  localparam int ENT = NRC_WB_ENT, NIN = NRC_NWR, NOUT = NRC_MRF_WP, NS = NRC_MRF_RP;
  localparam int TAG_W = NRC_TAG_W, DW = DATA_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NIN-1:0]             in_v;
  logic [NIN-1:0][TAG_W-1:0]  in_reg;
  logic [NIN-1:0][DW-1:0]     in_data;
  logic                       in_ready;
  logic [NOUT-1:0]            out_v;
  logic [NOUT-1:0][TAG_W-1:0] out_reg;
  logic [NOUT-1:0][DW-1:0]    out_data;
  logic [NS-1:0][TAG_W-1:0]   s_reg;
  logic [NS-1:0]              s_hit;
  logic [NS-1:0][DW-1:0]      s_data;

  norcs_wb dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_shit = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #5_000_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  typedef struct { bit [TAG_W-1:0] r; bit [DW-1:0] d; } ent_t;
  ent_t q [$];

  initial begin
    in_v = '0; in_reg = '0; in_data = '0; s_reg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int nd;
      check(in_ready == (q.size() + NIN <= ENT), "in_ready");
      if (!in_ready) n_full++;
      for (int j = 0; j < NIN; j++) begin
        in_v[j] = in_ready && $urandom_range(3) != 0;
        in_reg[j] = TAG_W'($urandom_range(7));
        in_data[j] = {$urandom, $urandom};
      end
      for (int s = 0; s < NS; s++) s_reg[s] = TAG_W'($urandom_range(7));
      #1;
      for (int o = 0; o < NOUT; o++) begin
        check(out_v[o] == (o < q.size()), "out_v");
        if (o < q.size()) begin
          check(out_reg[o] == q[o].r, "out_reg");
          check(out_data[o] == q[o].d, "out_data");
        end
      end
      for (int s = 0; s < NS; s++) begin
        bit h; bit [DW-1:0] d; h = 0; d = '0;
        foreach (q[e]) if (q[e].r == s_reg[s]) begin h = 1; d = q[e].d; end
        check(s_hit[s] == h, "s_hit");
        if (h) begin check(s_data[s] == d, "s_data"); n_shit++; end
      end
      @(posedge clk);
      nd = (q.size() < NOUT) ? q.size() : NOUT;
      repeat (nd) void'(q.pop_front());
      for (int j = 0; j < NIN; j++) if (in_v[j]) q.push_back('{in_reg[j], in_data[j]});
      @(negedge clk);
    end
    $display("full_cycles=%0d search_hits=%0d", n_full, n_shit);
    check(n_full > 0 && n_shit > 0, "backpressure and search exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
