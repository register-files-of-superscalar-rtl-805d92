// tb_norcs_rcd: self-checking testbench for the NORCS register cache data
// array.  A model array mirrors the contents.  Each cycle every write port
// gets a random one-hot wordline (or none), with distinct entries per cycle,
// and every read port a random one-hot wordline (or none).  Reads are
// checked combinationally before the clock edge (old contents, 0 for no
// wordline); the model is then updated with the writes.
`timescale 1ns/1ps
module tb_norcs_rcd;
  import rf_pkg::*;
  localparam int ENT = NRC_RC_ENT, NR = NRC_NRD, NW = NRC_NWR, DW = DATA_W;

  logic clk = 0;
  always #5 clk = ~clk;
  logic [NR-1:0][ENT-1:0] r_wl;
  logic [NR-1:0][DW-1:0]  r_data;
  logic [NW-1:0][ENT-1:0] w_wl;
  logic [NW-1:0][DW-1:0]  w_data;

  norcs_rcd dut (.*);

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

  bit [DW-1:0] m [ENT];

  initial begin
    r_wl = '0;
    // fill every entry first
    for (int e = 0; e < ENT; e++) begin
      @(negedge clk);
      w_wl = '0; w_wl[0][e] = 1; w_data[0] = {$urandom, $urandom}; m[e] = w_data[0];
    end
    for (int cyc = 0; cyc < 10000; cyc++) begin
      bit [ENT-1:0] used; used = '0;
      @(negedge clk);
      for (int j = 0; j < NW; j++) begin
        int e = $urandom_range(ENT-1);
        w_wl[j] = '0;
        w_data[j] = {$urandom, $urandom};
        if ($urandom_range(1) && !used[e]) begin w_wl[j][e] = 1; used[e] = 1; end
      end
      for (int r = 0; r < NR; r++) begin
        r_wl[r] = '0;
        if ($urandom_range(4) != 0) r_wl[r][$urandom_range(ENT-1)] = 1;
      end
      #1;
      for (int r = 0; r < NR; r++) begin
        bit [DW-1:0] e; e = '0;
        for (int k = 0; k < ENT; k++) if (r_wl[r][k]) e = m[k];
        check(r_data[r] == e, "r_data");
      end
      @(posedge clk);
      for (int j = 0; j < NW; j++)
        for (int k = 0; k < ENT; k++) if (w_wl[j][k]) m[k] = w_data[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
