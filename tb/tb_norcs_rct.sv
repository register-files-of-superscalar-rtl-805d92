// tb_norcs_rct: self-checking testbench for the NORCS tag array.
//
// A reference model keeps the tags, valid flags and the round-robin
// allocation pointer.  Each cycle the testbench drives random search
// register numbers (from a small range so that hits are common) and a
// random set of writes with distinct registers, with w_en high most of the
// time.  Before the clock edge it checks every read_hit wordline vector,
// the write wordlines and alloc_mask against the model; then the model is
// updated the same way the array should be (old copies invalidated, new
// entries written, pointer advanced only when w_en is high).  Also counted:
// hits, and writes that invalidated an older copy.
`timescale 1ns/1ps
module tb_norcs_rct;
  import rf_pkg::*;
  localparam int ENT = NRC_RC_ENT, TAG_W = NRC_TAG_W, NS = NRC_NRD, NW = NRC_NWR;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NS-1:0][TAG_W-1:0] s_reg;
  logic [NS-1:0][ENT-1:0]   s_hit;
  logic [NW-1:0]            w_v;
  logic [NW-1:0][TAG_W-1:0] w_reg;
  logic                     w_en;
  logic [NW-1:0][ENT-1:0]   w_wl;
  logic [ENT-1:0]           alloc_mask;

  norcs_rct dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_inval = 0;
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

  bit [TAG_W-1:0] m_tag [ENT];
  bit             m_val [ENT];
  int             m_ptr;

  initial begin
    foreach (m_val[e]) begin m_val[e] = 0; m_tag[e] = 0; end
    m_ptr = 0;
    s_reg = '0; w_v = '0; w_reg = '0; w_en = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit [ENT-1:0] exp_wl [NW];
      bit [ENT-1:0] exp_mask;
      int p;
      for (int s = 0; s < NS; s++) s_reg[s] = TAG_W'($urandom_range(15));
      for (int j = 0; j < NW; j++) begin
        bit dup;
        w_v[j] = $urandom_range(2) != 0;
        do begin
          dup = 0;
          w_reg[j] = TAG_W'($urandom_range(15));
          for (int i = 0; i < j; i++) if (w_v[i] && w_reg[i] == w_reg[j]) dup = 1;
        end while (dup);
      end
      w_en = $urandom_range(5) != 0;
      #1;
      for (int s = 0; s < NS; s++) begin
        bit [ENT-1:0] e; e = '0;
        for (int k = 0; k < ENT; k++) e[k] = m_val[k] && m_tag[k] == s_reg[s];
        check(s_hit[s] == e, "s_hit");
        if (e != 0) n_hit++;
      end
      p = m_ptr; exp_mask = '0;
      for (int j = 0; j < NW; j++) begin
        exp_wl[j] = '0;
        if (w_v[j]) begin exp_wl[j][p] = 1; exp_mask[p] = 1; p = (p + 1) % ENT; end
        check(w_wl[j] == exp_wl[j], "w_wl");
      end
      check(alloc_mask == exp_mask, "alloc_mask");
      @(posedge clk);
      if (w_en) begin
        for (int k = 0; k < ENT; k++)
          for (int j = 0; j < NW; j++)
            if (w_v[j] && m_val[k] && m_tag[k] == w_reg[j] && !exp_wl[j][k]) begin
              m_val[k] = 0; n_inval++;
            end
        for (int j = 0; j < NW; j++)
          for (int k = 0; k < ENT; k++)
            if (exp_wl[j][k]) begin m_tag[k] = w_reg[j]; m_val[k] = 1; end
        m_ptr = p;
      end
      @(negedge clk);
    end
    $display("hits=%0d invalidated_old_copies=%0d", n_hit, n_inval);
    check(n_hit > 0 && n_inval > 0, "hits and invalidations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
