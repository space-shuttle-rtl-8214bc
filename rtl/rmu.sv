// rmu: Reliability Monitoring Unit. For every one of the NUM_REGS register
// addresses it holds four CNT_W-bit counters: protected writes, protected
// reads, detected errors and corrected errors. Each counter of the address in
// evt_i is incremented at the rising edge after the event (all four may count
// in the same cycle); counters wrap at 2^CNT_W and clear only at reset.
// The read-out port (rd_addr_i, rd_sel_i) is combinational, so a read in the
// cycle after an event already sees it. Raw (injection / inspection) accesses
// are not counted. The four counters and their 32-bit width follow the
// published design; wrap-around and the read-out port are this design's own.
module rmu
  import ss_pkg::*;
#(
  parameter int unsigned N = NUM_REGS,
  parameter int unsigned W = CNT_W
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  rmu_evt_t             evt_i,
  input  logic [$clog2(N)-1:0] rd_addr_i,
  input  cnt_sel_e             rd_sel_i,
  output logic [W-1:0]         rd_cnt_o
);

  logic [W-1:0] cnt_q [N][NUM_CNT];

  logic [NUM_CNT-1:0] inc;
  assign inc[CNT_WRITES]    = evt_i.wr;
  assign inc[CNT_READS]     = evt_i.rd;
  assign inc[CNT_DETECTED]  = evt_i.det;
  assign inc[CNT_CORRECTED] = evt_i.cor;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned r = 0; r < N; r++)
        for (int unsigned c = 0; c < NUM_CNT; c++) cnt_q[r][c] <= '0;
    end else begin
      for (int unsigned c = 0; c < NUM_CNT; c++)
        if (inc[c]) cnt_q[evt_i.addr][c] <= cnt_q[evt_i.addr][c] + W'(1);
    end
  end

  assign rd_cnt_o = cnt_q[rd_addr_i][rd_sel_i];

endmodule
