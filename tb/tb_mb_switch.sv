// tb_mb_switch: the read-switch configuration (18 banks to 10 ports) with
// random selects, including several ports on the same bank; each output
// must equal the selected input.
module tb_mb_switch;
  localparam int NIN = 18, NOUT = 10;
  logic [NIN-1:0][63:0] din;
  logic [NOUT-1:0][4:0] sel;
  logic [NOUT-1:0][63:0] dout;
  int checks = 0, failures = 0;

  mb_switch u_dut (.din(din), .sel(sel), .dout(dout));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NIN; i++) din[i] = {$urandom, $urandom};
      for (int o = 0; o < NOUT; o++) sel[o] = 5'($urandom_range(0, (n % 2) ? 2 : NIN - 1));
      #1;
      for (int o = 0; o < NOUT; o++) begin
        checks++;
        if (dout[o] !== din[sel[o]]) begin failures++; $display("FAIL out %0d", o); end
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
