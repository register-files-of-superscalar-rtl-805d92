// tb_rf_bank: checks the single-port bank against a reference array.
// Random reads and writes, one per cycle; a write drives the written word
// on the port in the same cycle; a read returns the last word written.
module tb_rf_bank;
  localparam int DEPTH = rf_pkg::MST_BANK_DEPTH;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [3:0] idx;
  logic [63:0] wdata, rdata;
  logic [63:0] refm [DEPTH];
  int checks = 0, failures = 0;

  rf_bank u_dut (.clk(clk), .en(en), .we(we), .idx(idx), .wdata(wdata), .rdata(rdata));

  initial begin
    en = 0; we = 0; idx = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1; we = 1; idx = 4'(i); wdata = {$urandom, $urandom}; refm[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = 1; we = ($urandom_range(0, 2) == 0); idx = 4'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom, $urandom};
      #1;
      checks++;
      if (we) begin
        if (rdata !== wdata) begin failures++; $display("FAIL write port data"); end
        refm[idx] = wdata;
      end else if (rdata !== refm[idx]) begin
        failures++; $display("FAIL read idx %0d %h exp %h", idx, rdata, refm[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
