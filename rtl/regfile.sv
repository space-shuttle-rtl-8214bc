// regfile: the 32 x 32-bit flip-flop register file, made of NUM_BANKS
// independent rf_bank instances. Each bank has its own write port and read
// port, so a protected write can place a word and its copies or check bits in
// up to three banks in one cycle, and a protected read sees all banks of a row
// at once. Physical register p lives in bank p[2:0], row p[4:3].
// Timing: writes at the rising edge, reads combinational.
// The 32 registers, 32-bit width and 8 parallel banks follow the published
// design; the per-bank port arrangement is this design's own.
module regfile
  import ss_pkg::*;
(
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  bank_wr_t [NUM_BANKS-1:0]  wr_i,
  input  idx_t     [NUM_BANKS-1:0]  ridx_i,
  output word_t    [NUM_BANKS-1:0]  rdata_o
);

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    rf_bank #(.N(REGS_PER_BANK), .W(DATA_W)) u_bank (
      .clk_i,
      .rst_ni,
      .we_i    (wr_i[b].we),
      .widx_i  (wr_i[b].idx),
      .wdata_i (wr_i[b].data),
      .ridx_i  (ridx_i[b]),
      .rdata_o (rdata_o[b])
    );
  end

endmodule
