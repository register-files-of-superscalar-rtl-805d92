// bank_arbiter: request decoders plus one fixed-priority arbiter per bank.
//
// Every request port carries a bank number.  A decoder per port turns the
// bank number into a one-hot request vector; the b-th bits of all vectors
// form the request lines of bank b's arbiter, which grants the lowest
// requesting port index.  The arbiters of all banks work in parallel; the
// per-bank grants are then OR-gathered back into one grant per port.
// bank_en[b] = 0 disables a bank (used for banks busy with a write).
//
// Purely combinational.  Lower port index means higher priority: the user
// orders its ports so (carried-over accesses first, writes ahead of reads).
// The decoder/arbiter/OR structure follows the design description; fixed
// priority is as described there; the bank_en input is this design's own.
module bank_arbiter #(
  parameter int unsigned NREQ   = 2 * (rf_pkg::MST_NREAD + rf_pkg::MST_NWRITE),
  parameter int unsigned NBANK  = rf_pkg::MST_NBANK,
  parameter int unsigned BANK_W = rf_pkg::MST_BANK_W,
  localparam int unsigned RI_W  = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic [NREQ-1:0]              req,
  input  logic [NREQ-1:0][BANK_W-1:0]  bank,
  input  logic [NBANK-1:0]             bank_en,
  output logic [NREQ-1:0]              gnt,
  output logic [NBANK-1:0]             bank_gnt_v,
  output logic [NBANK-1:0][RI_W-1:0]   bank_gnt_idx
);
  // decoded requests: dreq[b][r]
  logic [NBANK-1:0][NREQ-1:0] dreq;
  logic [NBANK-1:0][NREQ-1:0] dgnt;

  always_comb begin
    for (int b = 0; b < NBANK; b++)
      for (int r = 0; r < NREQ; r++)
        dreq[b][r] = req[r] && (32'(bank[r]) == b) && bank_en[b];
  end

  // one fixed-priority arbiter per bank
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      dgnt[b]         = '0;
      bank_gnt_v[b]   = 1'b0;
      bank_gnt_idx[b] = '0;
      for (int r = 0; r < NREQ; r++) begin
        if (dreq[b][r] && !bank_gnt_v[b]) begin
          dgnt[b][r]      = 1'b1;
          bank_gnt_v[b]   = 1'b1;
          bank_gnt_idx[b] = RI_W'(r);
        end
      end
    end
  end

  // OR-gather of the per-bank grants
  always_comb begin
    gnt = '0;
    for (int b = 0; b < NBANK; b++) gnt |= dgnt[b];
  end
endmodule
