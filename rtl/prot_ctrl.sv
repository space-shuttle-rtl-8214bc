// prot_ctrl: protection controller of the register file.
//
// It keeps, for each of the 32 register addresses, the storage mechanism the
// register was last written with, and turns each command into bank accesses:
//
//   mode          bank b (= addr[2:0])  bank b+1            bank b+2
//   NONE          data                  -                   -
//   ECC           data                  SECDED check bits   -
//   TMR           data                  data                data
//   SHADOW        data                  data                -
//   ECC_SHADOW    data                  data (shadow)       check bits of shadow
//
// all in row addr[4:3], bank numbers taken modulo 8. A protected write
// (OP_WRITE) fills all copies in one cycle. A protected read (OP_READ) reads
// them in parallel and checks them:
//   ECC        - SECDED decode; one flipped bit corrected, two detected.
//   TMR        - bitwise majority vote; any disagreement detected and corrected.
//   SHADOW     - primary and shadow compared; a difference is detected but
//                cannot be corrected, the primary is returned.
//   ECC_SHADOW - the shadow is SECDED-decoded; if it decodes, the decoded
//                shadow is returned and a primary that differs from it counts
//                as a corrected error; if the shadow has a double error the
//                primary is returned and flagged uncorrectable.
// Raw commands write or read one physical register unchecked; they are how
// errors are injected and how individual copies are inspected, and they do
// not change the stored modes. Reads do not write corrected data back.
//
// Timing: one command per cycle; the response of a read command appears in
// rsp_o one cycle later for one cycle. The RMU events of a protected access
// are given combinationally in the command's cycle. For OP_CNT_READ the
// counter value and the RMU copy comparison come in on cnt_i/cnt_mismatch_i
// (addressed by the command's addr and cnt_sel) and are registered the same way.
//
// The five mechanisms follow the published design; the bank layout, the
// command set and the exact error flags are this design's own.
module prot_ctrl
  import ss_pkg::*;
(
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic                      cmd_valid_i,
  input  cmd_t                      cmd_i,
  // register file
  output bank_wr_t [NUM_BANKS-1:0]  rf_wr_o,
  output idx_t     [NUM_BANKS-1:0]  rf_ridx_o,
  input  word_t    [NUM_BANKS-1:0]  rf_rdata_i,
  // reliability monitoring unit
  output rmu_evt_t                  evt_o,
  input  cnt_t                      cnt_i,
  input  logic                      cnt_mismatch_i,
  // response
  output rsp_t                      rsp_o
);

  prot_mode_e mode_q [NUM_REGS];

  bank_t b0, b1, b2;
  idx_t  row;
  assign b0  = cmd_i.addr[BANK_W-1:0];
  assign b1  = b0 + bank_t'(1);
  assign b2  = b0 + bank_t'(2);
  assign row = cmd_i.addr[ADDR_W-1:BANK_W];

  logic is_write, is_read, is_raw_write, is_raw_read, is_cnt_read;
  assign is_write     = cmd_valid_i && (cmd_i.op == OP_WRITE);
  assign is_read      = cmd_valid_i && (cmd_i.op == OP_READ);
  assign is_raw_write = cmd_valid_i && (cmd_i.op == OP_RAW_WRITE);
  assign is_raw_read  = cmd_valid_i && (cmd_i.op == OP_RAW_READ);
  assign is_cnt_read  = cmd_valid_i && (cmd_i.op == OP_CNT_READ);

  prot_mode_e wmode;
  always_comb begin
    unique case (cmd_i.mode)
      MODE_ECC, MODE_TMR, MODE_SHADOW, MODE_ECC_SHADOW: wmode = cmd_i.mode;
      default:                                          wmode = MODE_NONE;
    endcase
  end

  // ---------------- write side ----------------
  ecc_t wecc;
  secded_enc u_wenc (.data_i(cmd_i.wdata), .ecc_o(wecc));

  always_comb begin
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      rf_wr_o[b].we   = 1'b0;
      rf_wr_o[b].idx  = row;
      rf_wr_o[b].data = cmd_i.wdata;
    end
    if (is_raw_write) begin
      rf_wr_o[b0].we = 1'b1;
    end else if (is_write) begin
      rf_wr_o[b0].we = 1'b1;
      unique case (wmode)
        MODE_ECC: begin
          rf_wr_o[b1].we   = 1'b1;
          rf_wr_o[b1].data = word_t'(wecc);
        end
        MODE_TMR: begin
          rf_wr_o[b1].we = 1'b1;
          rf_wr_o[b2].we = 1'b1;
        end
        MODE_SHADOW: begin
          rf_wr_o[b1].we = 1'b1;
        end
        MODE_ECC_SHADOW: begin
          rf_wr_o[b1].we   = 1'b1;
          rf_wr_o[b2].we   = 1'b1;
          rf_wr_o[b2].data = word_t'(wecc);
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned r = 0; r < NUM_REGS; r++) mode_q[r] <= MODE_NONE;
    end else if (is_write) begin
      mode_q[cmd_i.addr] <= wmode;
    end
  end

  // ---------------- read side ----------------
  always_comb begin
    for (int unsigned b = 0; b < NUM_BANKS; b++) rf_ridx_o[b] = row;
  end

  word_t c0, c1, c2;
  assign c0 = rf_rdata_i[b0];
  assign c1 = rf_rdata_i[b1];
  assign c2 = rf_rdata_i[b2];

  // ECC mode: data in c0, check bits in c1
  word_t ecc_data;
  logic  ecc_single, ecc_double;
  secded_dec u_dec_ecc (
    .data_i   (c0),
    .ecc_i    (c1[ECC_W-1:0]),
    .data_o   (ecc_data),
    .single_o (ecc_single),
    .double_o (ecc_double)
  );

  // ECC shadow mode: shadow in c1, its check bits in c2
  word_t sh_data;
  logic  sh_single, sh_double;
  secded_dec u_dec_shadow (
    .data_i   (c1),
    .ecc_i    (c2[ECC_W-1:0]),
    .data_o   (sh_data),
    .single_o (sh_single),
    .double_o (sh_double)
  );

  word_t tmr_data;
  logic  tmr_mismatch;
  tmr_voter u_vote (.a_i(c0), .b_i(c1), .c_i(c2), .vote_o(tmr_data), .mismatch_o(tmr_mismatch));

  word_t rd_data;
  logic  rd_det, rd_cor, rd_unc;
  always_comb begin
    rd_data = c0;
    rd_det  = 1'b0;
    rd_cor  = 1'b0;
    rd_unc  = 1'b0;
    unique case (mode_q[cmd_i.addr])
      MODE_ECC: begin
        rd_data = ecc_data;
        rd_det  = ecc_single || ecc_double;
        rd_cor  = ecc_single;
        rd_unc  = ecc_double;
      end
      MODE_TMR: begin
        rd_data = tmr_data;
        rd_det  = tmr_mismatch;
        rd_cor  = tmr_mismatch;
      end
      MODE_SHADOW: begin
        rd_det = (c0 != c1);
        rd_unc = (c0 != c1);
      end
      MODE_ECC_SHADOW: begin
        if (sh_double) begin
          rd_det = 1'b1;
          rd_unc = 1'b1;
        end else begin
          rd_data = sh_data;
          rd_det  = sh_single || (c0 != sh_data);
          rd_cor  = sh_single || (c0 != sh_data);
        end
      end
      default: ;
    endcase
  end

  // ---------------- events and response ----------------
  assign evt_o.wr   = is_write;
  assign evt_o.rd   = is_read;
  assign evt_o.det  = is_read && rd_det;
  assign evt_o.cor  = is_read && rd_cor;
  assign evt_o.addr = cmd_i.addr;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rsp_o <= '0;
    end else begin
      rsp_o.valid         <= is_read || is_raw_read || is_cnt_read;
      rsp_o.detected      <= is_read && rd_det;
      rsp_o.corrected     <= is_read && rd_cor;
      rsp_o.uncorrectable <= is_read && rd_unc;
      rsp_o.rmu_mismatch  <= is_cnt_read && cnt_mismatch_i;
      if (is_read)          rsp_o.data <= rd_data;
      else if (is_raw_read) rsp_o.data <= c0;
      else if (is_cnt_read) rsp_o.data <= cnt_i;
    end
  end

  // Only the defined opcodes may be issued.
  a_known_op: assert property (@(posedge clk_i) disable iff (!rst_ni)
    cmd_valid_i |-> (cmd_i.op inside {OP_NOP, OP_WRITE, OP_READ, OP_RAW_WRITE, OP_RAW_READ, OP_CNT_READ}));
  // A response follows exactly the read commands.
  a_rsp_follows_read: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (is_read || is_raw_read || is_cnt_read) |=> rsp_o.valid);

endmodule
