// rmu_dup: the duplicated Reliability Monitoring Unit. Two identical rmu
// copies receive the same events and the same read address; the value of
// copy A is returned and mismatch_o is set when copy B holds a different
// value, so an upset in the monitor itself is seen on read-out rather than
// taken for a real count. Same timing as rmu. Duplication follows the
// published design; comparing on read-out is this design's own choice.
module rmu_dup
  import ss_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  rmu_evt_t evt_i,
  input  addr_t    rd_addr_i,
  input  cnt_sel_e rd_sel_i,
  output cnt_t     rd_cnt_o,
  output logic     mismatch_o
);

  cnt_t cnt_a, cnt_b;

  rmu u_rmu_a (.clk_i, .rst_ni, .evt_i, .rd_addr_i, .rd_sel_i, .rd_cnt_o(cnt_a));
  rmu u_rmu_b (.clk_i, .rst_ni, .evt_i, .rd_addr_i, .rd_sel_i, .rd_cnt_o(cnt_b));

  assign rd_cnt_o   = cnt_a;
  assign mismatch_o = (cnt_a != cnt_b);

endmodule
