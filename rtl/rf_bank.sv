// rf_bank: one bank of a multibanked register file, made of single-port
// (1-read/write) cells.
//
// A bank serves exactly one access per cycle, a read or a write.  The
// access is registered by the arbitration stage in front of it, so in the
// bank cycle the address (idx), write enable and write data are stable; the
// stored word is read combinationally and a write lands at the end of the
// cycle.  During a write the port drives the written word, so a read that
// was aggregated with the write (same register, same cycle) takes the new
// value straight from the bank port instead of the bypass network.
//
// Interface: en/we/idx/wdata in the bank cycle, rdata valid in the same
// cycle (registered by the d1/d2 latches of the pipeline that follows).
// The one-access-per-cycle bank follows the design description; the
// asynchronous read inside the cycle and the absence of a reset on the
// contents are choices of this implementation.
module rf_bank #(
  parameter int unsigned DEPTH  = rf_pkg::MST_BANK_DEPTH,
  parameter int unsigned IDX_W  = rf_pkg::MST_IDX_W,
  parameter int unsigned DATA_W = rf_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [IDX_W-1:0]  idx,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we && (32'(idx) < DEPTH)) mem[idx] <= wdata;
  end

  always_comb begin
    if (we)                       rdata = wdata;
    else if (32'(idx) < DEPTH)    rdata = mem[idx];
    else                          rdata = '0;
  end
endmodule
