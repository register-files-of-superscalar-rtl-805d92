// rf_pkg: constants shared by the register file systems.
//
// The default sizes of the three designs live here so that modules and
// testbenches agree on them:
//   * MStage (skewed multistaged multibanked register file): 18 banks of
//     1-read/write cells, 10 read + 5 write request ports, 180 integer
//     physical registers, 64-bit words.  The register number is the
//     concatenation {bank, intra-bank index}.
//   * BAIS (bank-aware instruction scheduler): 64-entry window, 3 issue
//     ports, 24 banks.
//   * NORCS (register cache system) for a 4-issue core: 8-entry register
//     cache, 128-entry main register file with 2 read and 2 write ports,
//     4-entry write buffer.
// The bank and index field widths (5 + 4 bits for MStage, 5 + 3 for BAIS)
// are choices of this design; the sizes themselves follow the design
// description.
package rf_pkg;
  localparam int unsigned DATA_W          = 64;

  // MStage
  localparam int unsigned MST_NREAD       = 10;
  localparam int unsigned MST_NWRITE      = 5;
  localparam int unsigned MST_NBANK       = 18;
  localparam int unsigned MST_BANK_DEPTH  = 10;   // 180 registers / 18 banks
  localparam int unsigned MST_BANK_W      = 5;
  localparam int unsigned MST_IDX_W       = 4;

  // BAIS
  localparam int unsigned BAIS_W          = 64;
  localparam int unsigned BAIS_ISSUE      = 3;
  localparam int unsigned BAIS_NBANK      = 24;
  localparam int unsigned BAIS_BANK_W     = 5;
  localparam int unsigned BAIS_IDX_W      = 3;    // 180 registers / 24 banks -> 8
  localparam int unsigned BAIS_WB_DIST    = 2;

  // NORCS
  localparam int unsigned NRC_ISSUE       = 4;
  localparam int unsigned NRC_NRD         = 2 * NRC_ISSUE;   // two sources per instruction
  localparam int unsigned NRC_NWR         = NRC_ISSUE;       // one result per instruction
  localparam int unsigned NRC_RC_ENT      = 8;
  localparam int unsigned NRC_NREGS       = 128;
  localparam int unsigned NRC_TAG_W       = 7;
  localparam int unsigned NRC_MRF_RP      = 2;
  localparam int unsigned NRC_MRF_WP      = 2;
  localparam int unsigned NRC_WB_ENT      = 4;
endpackage
