// space_shuttle: top of the register-file reliability test design.
//
// A command port (one command per cycle, see ss_pkg::cmd_t) drives the
// protection controller, which stores each word in the 8-bank flip-flop
// register file under one of five storage mechanisms (none, ECC, triple
// redundancy, shadow copy, ECC-protected shadow copy), checks and corrects it
// on read, and lets any physical register be overwritten or inspected
// directly for error injection. Every protected access is counted per register
// by the duplicated Reliability Monitoring Unit (writes, reads, detected and
// corrected errors). The response of each read command comes out on rsp_o one
// cycle after the command and on the GPIO pins one cycle after that.
//
// On the fabricated chip the command port is driven by the shuttle's harness
// (its logic-analyzer probes); here it is brought out as plain ports.
module space_shuttle
  import ss_pkg::*;
(
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                cmd_valid_i,
  input  cmd_t                cmd_i,
  output rsp_t                rsp_o,
  input  logic                gpio_oe_i,
  output logic [NUM_GPIO-1:0] gpio_o,
  output logic [NUM_GPIO-1:0] gpio_oeb_o
);

  bank_wr_t [NUM_BANKS-1:0] rf_wr;
  idx_t     [NUM_BANKS-1:0] rf_ridx;
  word_t    [NUM_BANKS-1:0] rf_rdata;
  rmu_evt_t                 evt;
  cnt_t                     cnt;
  logic                     cnt_mismatch;

  prot_ctrl u_ctrl (
    .clk_i,
    .rst_ni,
    .cmd_valid_i,
    .cmd_i,
    .rf_wr_o        (rf_wr),
    .rf_ridx_o      (rf_ridx),
    .rf_rdata_i     (rf_rdata),
    .evt_o          (evt),
    .cnt_i          (cnt),
    .cnt_mismatch_i (cnt_mismatch),
    .rsp_o
  );

  regfile u_rf (
    .clk_i,
    .rst_ni,
    .wr_i    (rf_wr),
    .ridx_i  (rf_ridx),
    .rdata_o (rf_rdata)
  );

  rmu_dup u_rmu (
    .clk_i,
    .rst_ni,
    .evt_i      (evt),
    .rd_addr_i  (cmd_i.addr),
    .rd_sel_i   (cmd_i.cnt_sel),
    .rd_cnt_o   (cnt),
    .mismatch_o (cnt_mismatch)
  );

  gpio_map u_gpio (
    .clk_i,
    .rst_ni,
    .rsp_i      (rsp_o),
    .oe_i       (gpio_oe_i),
    .gpio_o,
    .gpio_oeb_o
  );

endmodule
