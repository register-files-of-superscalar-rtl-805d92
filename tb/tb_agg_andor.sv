// tb_agg_andor: random leader links and leader grants; every valid access
// must be granted exactly when its leader's request was granted.
module tb_agg_andor;
  localparam int N = 15;
  logic [N-1:0] valid, gnt_in, gnt_out;
  logic [N-1:0][3:0] leader;
  int checks = 0, failures = 0;

  agg_andor u_dut (.valid(valid), .leader(leader), .gnt_in(gnt_in), .gnt_out(gnt_out));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N; i++) begin
        valid[i]  = ($urandom_range(0, 3) != 0);
        leader[i] = 4'($urandom_range(0, i));
        gnt_in[i] = ($urandom_range(0, 1) == 1);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (gnt_out[i] != (valid[i] && gnt_in[leader[i]])) begin
          failures++; $display("FAIL access %0d", i);
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
