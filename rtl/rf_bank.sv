// rf_bank: one bank of the flip-flop register file, REGS_PER_BANK words of
// DATA_W bits. One write port (written at the rising clock edge when we_i is
// set) and one combinational read port, so a read in the cycle after a write
// sees the new value. Registers reset to zero (asynchronous, active-low),
// which is also a valid SECDED codeword, so every mode reads clean after
// reset. Flip-flops instead of an SRAM macro follow the published design; the
// port structure and the reset are this design's own.
module rf_bank
  import ss_pkg::*;
#(
  parameter int unsigned N = REGS_PER_BANK,
  parameter int unsigned W = DATA_W
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 we_i,
  input  logic [$clog2(N)-1:0] widx_i,
  input  logic [W-1:0]         wdata_i,
  input  logic [$clog2(N)-1:0] ridx_i,
  output logic [W-1:0]         rdata_o
);

  logic [W-1:0] regs_q [N];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned i = 0; i < N; i++) regs_q[i] <= '0;
    end else if (we_i) begin
      regs_q[widx_i] <= wdata_i;
    end
  end

  assign rdata_o = regs_q[ridx_i];

endmodule
