// tb_bank_arbiter: random requests against an independent model of
// fixed-priority per-bank arbitration: for every bank with at least one
// enabled request, exactly the lowest-index request to that bank wins.
module tb_bank_arbiter;
  localparam int NREQ = 30, NBANK = 18, BW = 5;
  logic [NREQ-1:0] req, gnt;
  logic [NREQ-1:0][BW-1:0] bank;
  logic [NBANK-1:0] bank_en, bank_gnt_v;
  logic [NBANK-1:0][4:0] bank_gnt_idx;
  int checks = 0, failures = 0;

  bank_arbiter u_dut (.req(req), .bank(bank), .bank_en(bank_en), .gnt(gnt),
    .bank_gnt_v(bank_gnt_v), .bank_gnt_idx(bank_gnt_idx));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [NREQ-1:0] exp_g;
      logic [NBANK-1:0] taken;
      for (int r = 0; r < NREQ; r++) begin
        req[r]  = ($urandom_range(0, 1) == 1);
        bank[r] = BW'($urandom_range(0, (n % 2) ? 3 : NBANK - 1));
      end
      bank_en = (n % 5 == 0) ? NBANK'($urandom) : '1;
      #1;
      exp_g = '0; taken = '0;
      for (int r = 0; r < NREQ; r++)
        if (req[r] && bank_en[bank[r]] && !taken[bank[r]]) begin
          exp_g[r] = 1; taken[bank[r]] = 1;
        end
      checks++;
      if (gnt !== exp_g) begin failures++; $display("FAIL gnt %h exp %h", gnt, exp_g); end
      checks++;
      if (bank_gnt_v !== taken) begin failures++; $display("FAIL bank_gnt_v"); end
      for (int b = 0; b < NBANK; b++)
        if (taken[b]) begin
          checks++;
          if (!(gnt[bank_gnt_idx[b]] && bank[bank_gnt_idx[b]] == b)) begin
            failures++; $display("FAIL bank_gnt_idx %0d", b);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
