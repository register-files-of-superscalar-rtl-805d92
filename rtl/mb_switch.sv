// mb_switch: any-to-any routing switch of a multibanked register file.
//
// Each of the NOUT outputs selects one of the NIN inputs by its sel index;
// several outputs may select the same input, which is how the read switch
// duplicates one bank word to every read port aggregated on it.  The same
// module is used as the read data switch (banks -> read ports), the write
// data switch (write ports -> banks) and the intra-bank register number
// switch.  Purely combinational; a select index >= NIN gives zero.
// The switch functions follow the design description; the multiplexer
// implementation is this design's own.
module mb_switch #(
  parameter int unsigned NIN  = rf_pkg::MST_NBANK,
  parameter int unsigned NOUT = rf_pkg::MST_NREAD,
  parameter int unsigned W    = rf_pkg::DATA_W,
  localparam int unsigned S_W = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic [NIN-1:0][W-1:0]  din,
  input  logic [NOUT-1:0][S_W-1:0] sel,
  output logic [NOUT-1:0][W-1:0] dout
);
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      dout[o] = '0;
      for (int i = 0; i < NIN; i++)
        if (32'(sel[o]) == i) dout[o] = din[i];
    end
  end
endmodule
