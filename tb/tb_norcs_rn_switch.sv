// tb_norcs_rn_switch: self-checking testbench for the register-number read
// switch.  Random miss vectors and register numbers are applied; the
// expected routing (the lowest-index missing operands, in order, to MRF
// ports 0, 1, ...) is computed by a loop in the testbench and compared with
// port_v, port_reg, port_src and served.  All miss vectors are also covered
// exhaustively once.
`timescale 1ns/1ps
module tb_norcs_rn_switch;
  import rf_pkg::*;
  localparam int N = NRC_NRD, NP = NRC_MRF_RP, TAG_W = NRC_TAG_W, SW = $clog2(N);

  logic [N-1:0]             miss, served;
  logic [N-1:0][TAG_W-1:0]  regn;
  logic [NP-1:0]            port_v;
  logic [NP-1:0][TAG_W-1:0] port_reg;
  logic [NP-1:0][SW-1:0]    port_src;

  norcs_rn_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #1_000_000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic one(logic [N-1:0] m);
    int p = 0;
    bit [N-1:0] es = '0;
    miss = m;
    for (int i = 0; i < N; i++) regn[i] = TAG_W'($urandom);
    #1;
    for (int i = 0; i < N; i++)
      if (m[i] && p < NP) begin
        check(port_v[p] == 1'b1, "port_v");
        check(port_reg[p] == regn[i], "port_reg");
        check(int'(port_src[p]) == i, "port_src");
        es[i] = 1; p++;
      end
    for (; p < NP; p++) check(port_v[p] == 1'b0, "idle port");
    check(served == es, "served");
  endtask

  initial begin
    for (int m = 0; m < (1 << N); m++) one(N'(m));
    for (int k = 0; k < 5000; k++) one(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
