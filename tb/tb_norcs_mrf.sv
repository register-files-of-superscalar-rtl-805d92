// tb_norcs_mrf: self-checking testbench for the NORCS main register file.
// All registers are written first; then each cycle random reads start on
// both read ports and random writes (distinct registers) go to both write
// ports.  The two-stage read is checked one cycle after the request: r_dv
// must equal the request and r_data must equal the model contents at that
// time (writes of earlier cycles visible, writes of the same cycle not).
`timescale 1ns/1ps
module tb_norcs_mrf;
  import rf_pkg::*;
  localparam int DEPTH = NRC_NREGS, NRP = NRC_MRF_RP, NWP = NRC_MRF_WP, DW = DATA_W;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NRP-1:0]         r_v, r_dv;
  logic [NRP-1:0][AW-1:0] r_addr;
  logic [NRP-1:0][DW-1:0] r_data;
  logic [NWP-1:0]         w_v;
  logic [NWP-1:0][AW-1:0] w_addr;
  logic [NWP-1:0][DW-1:0] w_data;

  norcs_mrf dut (.*);

  int checks = 0, failures = 0;
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

  bit [DW-1:0] m [DEPTH];
  bit          pv [NRP];
  int          pa [NRP];

  initial begin
    r_v = '0; r_addr = '0; w_v = '0; w_addr = '0; w_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      w_v = 1; w_addr[0] = AW'(a); w_data[0] = {$urandom, $urandom}; m[a] = w_data[0];
      @(negedge clk);
    end
    w_v = '0;
    foreach (pv[p]) pv[p] = 0;
    @(negedge clk);
    for (int cyc = 0; cyc < 10000; cyc++) begin
      // start new reads, then check the reads started last cycle
      for (int p = 0; p < NRP; p++) begin
        r_v[p] = $urandom_range(3) != 0; r_addr[p] = AW'($urandom_range(DEPTH-1));
      end
      #1;
      for (int p = 0; p < NRP; p++) begin
        check(r_dv[p] == pv[p], "r_dv");
        if (pv[p]) check(r_data[p] == m[pa[p]], "r_data");
        pv[p] = r_v[p]; pa[p] = r_addr[p];
      end
      for (int j = 0; j < NWP; j++) begin
        w_v[j] = $urandom_range(1);
        w_addr[j] = AW'($urandom_range(DEPTH-1));
        if (j > 0 && w_addr[j] == w_addr[0]) w_v[j] = 0;
        w_data[j] = {$urandom, $urandom};
      end
      @(posedge clk);
      for (int j = 0; j < NWP; j++) if (w_v[j]) m[w_addr[j]] = w_data[j];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
