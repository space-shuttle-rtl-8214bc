// tb_prot_ctrl: drives the protection controller together with the register
// file. For each storage mechanism it writes random words to random registers,
// checks the physical copies and check bits through raw reads, injects
// errors by raw writes (flipping chosen bits of chosen copies) and checks the
// protected read: returned word, detected / corrected / uncorrectable flags,
// the RMU events of the command's cycle, and the one-cycle response latency.
module tb_prot_ctrl;
  import ss_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid;
  cmd_t cmd;
  bank_wr_t [NUM_BANKS-1:0] rf_wr;
  idx_t     [NUM_BANKS-1:0] rf_ridx;
  word_t    [NUM_BANKS-1:0] rf_rdata;
  rmu_evt_t evt, last_evt;
  rsp_t rsp, last_rsp;
  int checks = 0, failures = 0;
  localparam word_t CNT_VALUE = 32'hC0FF_EE01;

  prot_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n), .cmd_valid_i(cmd_valid), .cmd_i(cmd),
    .rf_wr_o(rf_wr), .rf_ridx_o(rf_ridx), .rf_rdata_i(rf_rdata),
    .evt_o(evt), .cnt_i(CNT_VALUE), .cnt_mismatch_i(1'b1), .rsp_o(rsp)
  );
  regfile u_rf (.clk_i(clk), .rst_ni(rst_n), .wr_i(rf_wr), .ridx_i(rf_ridx), .rdata_o(rf_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic issue(op_e op, addr_t a, prot_mode_e m = MODE_NONE, word_t d = '0,
                       cnt_sel_e s = CNT_WRITES);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd = '{op: op, addr: a, mode: m, cnt_sel: s, wdata: d};
    #1 last_evt = evt;
    @(posedge clk);
    #1;
    cmd_valid = 1'b0;
    last_rsp = rsp;
    check(rsp.valid == (op inside {OP_READ, OP_RAW_READ, OP_CNT_READ}), "response valid one cycle after command");
  endtask

  task automatic flip(addr_t p, word_t mask);
    word_t v;
    issue(OP_RAW_READ, p);
    v = last_rsp.data;
    issue(OP_RAW_WRITE, p, MODE_NONE, v ^ mask);
  endtask

  task automatic expect_read(addr_t r, word_t exp, logic det, logic cor, logic unc, string what);
    issue(OP_READ, r);
    check(last_rsp.data == exp, $sformatf("%s: data %h expected %h", what, last_rsp.data, exp));
    check(last_rsp.detected == det && last_rsp.corrected == cor && last_rsp.uncorrectable == unc,
          $sformatf("%s: flags det=%b cor=%b unc=%b", what, last_rsp.detected,
                    last_rsp.corrected, last_rsp.uncorrectable));
    check(last_evt.rd && last_evt.det == det && last_evt.cor == cor && !last_evt.wr && last_evt.addr == r,
          $sformatf("%s: events", what));
  endtask

  task automatic expect_raw(addr_t p, word_t exp, string what);
    issue(OP_RAW_READ, p);
    check(last_rsp.data == exp && !last_rsp.detected, $sformatf("%s: raw %0d = %h expected %h", what, p, last_rsp.data, exp));
    check(!last_evt.rd && !last_evt.wr, "raw access raises no events");
  endtask

  task automatic write(addr_t r, prot_mode_e m, word_t x);
    issue(OP_WRITE, r, m, x);
    check(last_evt.wr && !last_evt.rd && last_evt.addr == r, "write event");
  endtask

  initial begin
    cmd_valid = 0;
    cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // After reset every register reads as zero with no error in any mode.
    expect_read(5'd9, '0, 0, 0, 0, "reset");

    for (int t = 0; t < 12; t++) begin
      addr_t r;
      word_t x, m1;
      r = addr_t'($urandom);
      x = $urandom;

      // ---- no protection ----
      write(r, MODE_NONE, x);
      expect_raw(r, x, "none copy");
      expect_read(r, x, 0, 0, 0, "none clean");
      m1 = rand_bits(1, 32);
      flip(r, m1);
      expect_read(r, x ^ m1, 0, 0, 0, "none upset passes unseen");

      // ---- ECC ----
      write(r, MODE_ECC, x);
      expect_raw(r, x, "ecc data");
      expect_raw(copy_addr(r, 1), word_t'(ref_ecc(x)), "ecc check bits");
      expect_read(r, x, 0, 0, 0, "ecc clean");
      flip(r, rand_bits(1, 32));
      expect_read(r, x, 1, 1, 0, "ecc single data error");
      write(r, MODE_ECC, x);
      flip(copy_addr(r, 1), rand_bits(1, 7));
      expect_read(r, x, 1, 1, 0, "ecc single check-bit error");
      write(r, MODE_ECC, x);
      flip(r, rand_bits(2, 32));
      issue(OP_READ, r);
      check(last_rsp.detected && last_rsp.uncorrectable && !last_rsp.corrected, "ecc double error");

      // ---- triple redundancy ----
      write(r, MODE_TMR, x);
      for (int k = 0; k < 3; k++) expect_raw(copy_addr(r, k), x, "tmr copy");
      expect_read(r, x, 0, 0, 0, "tmr clean");
      flip(copy_addr(r, t % 3), $urandom | 32'h1);
      expect_read(r, x, 1, 1, 0, "tmr one copy upset");

      // ---- shadow register ----
      write(r, MODE_SHADOW, x);
      for (int k = 0; k < 2; k++) expect_raw(copy_addr(r, k), x, "shadow copy");
      expect_read(r, x, 0, 0, 0, "shadow clean");
      flip(copy_addr(r, 1), rand_bits(1, 32));
      expect_read(r, x, 1, 0, 1, "shadow copy upset");
      write(r, MODE_SHADOW, x);
      m1 = rand_bits(3, 32);
      flip(r, m1);
      expect_read(r, x ^ m1, 1, 0, 1, "shadow primary upset");

      // ---- ECC shadow register ----
      write(r, MODE_ECC_SHADOW, x);
      expect_raw(r, x, "ecc shadow primary");
      expect_raw(copy_addr(r, 1), x, "ecc shadow copy");
      expect_raw(copy_addr(r, 2), word_t'(ref_ecc(x)), "ecc shadow check bits");
      expect_read(r, x, 0, 0, 0, "ecc shadow clean");
      flip(r, $urandom | 32'h4);
      expect_read(r, x, 1, 1, 0, "ecc shadow primary upset");
      write(r, MODE_ECC_SHADOW, x);
      flip(copy_addr(r, 1), rand_bits(1, 32));
      expect_read(r, x, 1, 1, 0, "ecc shadow single shadow error");
      write(r, MODE_ECC_SHADOW, x);
      flip(copy_addr(r, 1), rand_bits(2, 32));
      expect_read(r, x, 1, 0, 1, "ecc shadow double shadow error");
    end

    // The mode is kept per register: a TMR register next to plain ones.
    write(5'd8, MODE_TMR, 32'hA5A5_1234);
    write(5'd11, MODE_NONE, 32'h0BAD_F00D);
    flip(5'd9, 32'h10);
    expect_read(5'd8, 32'hA5A5_1234, 1, 1, 0, "tmr kept after neighbour write");
    expect_read(5'd11, 32'h0BAD_F00D, 0, 0, 0, "plain neighbour");

    // Counter read returns the RMU value and its comparison.
    issue(OP_CNT_READ, 5'd3, MODE_NONE, '0, CNT_READS);
    check(last_rsp.data == CNT_VALUE && last_rsp.rmu_mismatch, "counter read");
    // No response after a write.
    write(5'd0, MODE_NONE, 32'h1);
    check(!last_rsp.valid, "no response to a write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
