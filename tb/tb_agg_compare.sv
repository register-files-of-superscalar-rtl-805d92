// tb_agg_compare: random register numbers drawn from a small set so that
// matches are frequent; each access's leader must be the first valid
// access with the same register number, and is_leader exactly the valid
// accesses that are their own leader.
module tb_agg_compare;
  localparam int N = 15, RW = 9;
  logic [N-1:0] valid, is_leader;
  logic [N-1:0][RW-1:0] regn;
  logic [N-1:0][3:0] leader;
  int checks = 0, failures = 0;

  agg_compare u_dut (.valid(valid), .regn(regn), .leader(leader), .is_leader(is_leader));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N; i++) begin
        valid[i] = ($urandom_range(0, 3) != 0);
        regn[i]  = RW'($urandom_range(0, 7));
      end
      #1;
      for (int i = 0; i < N; i++) if (valid[i]) begin
        int l;
        l = i;
        for (int j = 0; j < i; j++) if (valid[j] && regn[j] == regn[i] && l == i) l = j;
        checks++;
        if (leader[i] != 4'(l) || is_leader[i] != (l == i)) begin
          failures++; $display("FAIL access %0d leader %0d exp %0d", i, leader[i], l);
        end
      end else begin
        checks++;
        if (is_leader[i]) begin failures++; $display("FAIL invalid access leads"); end
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
