// bais_rf: multibanked register file behind the BAIS scheduler.
//
// NBANK banks of single-port (1-read/write) cells, each DEPTH words deep,
// with register-number routing to the banks and a read switch from the
// banks to the NRP read ports.  A register number is {bank, index}.
// Because the BAIS select logic has already arbitrated the banks when it
// issued the instructions, there is no arbitration stage here: each bank
// simply takes the lowest-numbered request that names it.  Read ports
// naming the same register share one bank access (the read switch
// duplicates the word).  The only conflict left is the one BAIS lets
// through, two different registers of one bank read by one instruction:
// the second one is read in an extra cycle, during which the read stage
// holds (second, in_ready low).  A write has the bank before any read;
// BAIS never lets a read meet a write in one bank, so this only matters
// when the environment breaks that rule.
//
// Interface/timing: a read group (rd_v, rd_reg) is taken when in_valid &&
// in_ready, read in the next cycle and delivered registered one cycle
// later (out_valid, out_rd_data), plus one cycle per extra read cycle.
// Writes (wr_v, wr_reg, wr_data) go to the banks in the cycle they are
// presented.  Banks, switches and the extra read cycle follow the
// description of BAIS and of the multibanked register file; the lowest-
// port priority and the group-level hold are this design's choices.
module bais_rf
  import rf_pkg::*;
#(
  parameter int unsigned NBANK  = BAIS_NBANK,
  parameter int unsigned DEPTH  = 1 << BAIS_IDX_W,
  parameter int unsigned BANK_W = BAIS_BANK_W,
  parameter int unsigned IDX_W  = BAIS_IDX_W,
  parameter int unsigned NRP    = 2 * BAIS_ISSUE,
  parameter int unsigned NWP    = BAIS_ISSUE,
  parameter int unsigned DW     = DATA_W,
  localparam int unsigned REG_W = BANK_W + IDX_W,
  localparam int unsigned BS_W  = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [NRP-1:0]            rd_v,
  input  logic [NRP-1:0][REG_W-1:0] rd_reg,
  input  logic [NWP-1:0]            wr_v,
  input  logic [NWP-1:0][REG_W-1:0] wr_reg,
  input  logic [NWP-1:0][DW-1:0]    wr_data,
  output logic                      out_valid,
  output logic [NRP-1:0][DW-1:0]    out_rd_data,
  output logic                      second
);
  // ------------------------------------------------ read stage registers
  logic                      g_v;
  logic [NRP-1:0]            g_pend;     // reads not yet served
  logic [NRP-1:0][REG_W-1:0] g_reg;
  logic [NRP-1:0][DW-1:0]    col_q;

  // ------------------------------------------------ per-bank routing
  logic [NBANK-1:0]            b_en, b_we;
  logic [NBANK-1:0][IDX_W-1:0] b_idx;
  logic [NBANK-1:0][DW-1:0]    b_wdata, b_rdata;
  logic [NBANK-1:0][REG_W-1:0] b_rreg;    // register read by the bank this cycle
  logic [NRP-1:0]              served;

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      logic taken;
      taken      = 1'b0;
      b_en[b]    = 1'b0;
      b_we[b]    = 1'b0;
      b_idx[b]   = '0;
      b_wdata[b] = '0;
      b_rreg[b]  = '0;
      for (int j = 0; j < NWP; j++)
        if (!taken && wr_v[j] && 32'(wr_reg[j][REG_W-1 -: BANK_W]) == b) begin
          taken = 1'b1; b_en[b] = 1'b1; b_we[b] = 1'b1;
          b_idx[b] = wr_reg[j][IDX_W-1:0]; b_wdata[b] = wr_data[j];
        end
      for (int p = 0; p < NRP; p++)
        if (!taken && g_v && g_pend[p] && 32'(g_reg[p][REG_W-1 -: BANK_W]) == b) begin
          taken = 1'b1; b_en[b] = 1'b1;
          b_idx[b] = g_reg[p][IDX_W-1:0]; b_rreg[b] = g_reg[p];
        end
    end
    // a read is served when its bank reads exactly its register
    for (int p = 0; p < NRP; p++)
      served[p] = g_v && g_pend[p] && !b_we[g_reg[p][REG_W-1 -: BANK_W]] &&
                  b_en[g_reg[p][REG_W-1 -: BANK_W]] &&
                  b_rreg[g_reg[p][REG_W-1 -: BANK_W]] == g_reg[p];
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    rf_bank #(.DEPTH(DEPTH), .IDX_W(IDX_W), .DATA_W(DW)) u_bank (
      .clk, .en(b_en[b]), .we(b_we[b]), .idx(b_idx[b]), .wdata(b_wdata[b]), .rdata(b_rdata[b]));
  end

  // read switch: banks -> read ports
  logic [NRP-1:0][BS_W-1:0] rsel;
  logic [NRP-1:0][DW-1:0]   rdata;
  always_comb
    for (int p = 0; p < NRP; p++) rsel[p] = BS_W'(g_reg[p][REG_W-1 -: BANK_W]);
  mb_switch #(.NIN(NBANK), .NOUT(NRP), .W(DW)) u_rsw (.din(b_rdata), .sel(rsel), .dout(rdata));

  // ------------------------------------------------ control
  logic done;
  assign done     = g_v && ((g_pend & ~served) == '0);
  assign in_ready = !g_v || done;
  assign second   = g_v && !done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g_v       <= 1'b0;
      g_pend    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= done;
      if (in_ready) begin
        g_v    <= in_valid;
        g_pend <= in_valid ? rd_v : '0;
      end else begin
        g_pend <= g_pend & ~served;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready) g_reg <= rd_reg;
    for (int p = 0; p < NRP; p++) begin
      if (served[p]) col_q[p] <= rdata[p];
      else if (in_ready) col_q[p] <= '0;        // unused ports read as 0
    end
    for (int p = 0; p < NRP; p++)
      out_rd_data[p] <= served[p] ? rdata[p] : col_q[p];
  end
endmodule
