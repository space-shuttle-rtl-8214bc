// tb_space_shuttle: end-to-end test of the whole design at its default sizes.
//
// Through the command port it runs the sequence of a bench test of the chip:
// every register is written in one of the five storage mechanisms (chosen
// round-robin), read back, then errors are injected with raw writes and the
// protected reads are checked for the returned word and the error flags.
// A reference model in the testbench keeps the expected RMU counters, which
// are read back at the end for every register; the GPIO pins are checked
// against each response. Each mechanism (every storage mode, each kind of
// detection and correction, bank wrap-around, multi-bank parallel writes,
// raw injection and inspection, counter read-out, GPIO update) is counted,
// and one that never happened counts as a failure.
module tb_space_shuttle;
  import ss_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid;
  cmd_t cmd;
  rsp_t rsp, last_rsp;
  logic [NUM_GPIO-1:0] gpio, gpio_oeb;
  int checks = 0, failures = 0;
  int unsigned cnt_model [NUM_REGS][NUM_CNT];

  typedef enum int {
    EV_NONE_RW, EV_ECC_RW, EV_TMR_RW, EV_SHADOW_RW, EV_ECCSH_RW,
    EV_ECC_CORRECT, EV_ECC_DOUBLE, EV_TMR_CORRECT, EV_SHADOW_DETECT,
    EV_ECCSH_PRIMARY_FIX, EV_ECCSH_SHADOW_FIX, EV_ECCSH_UNCORR,
    EV_BANK_WRAP, EV_THREE_BANK_WRITE, EV_RAW_INJECT, EV_RAW_INSPECT,
    EV_CNT_READ, EV_GPIO_UPDATE, EV_NUM
  } ev_e;
  int ev_count [EV_NUM];

  space_shuttle dut (
    .clk_i(clk), .rst_ni(rst_n), .cmd_valid_i(cmd_valid), .cmd_i(cmd), .rsp_o(rsp),
    .gpio_oe_i(1'b1), .gpio_o(gpio), .gpio_oeb_o(gpio_oeb)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    @(posedge clk);
    #1;
    cmd_valid = 1'b0;
    cmd.op = OP_NOP;
    last_rsp = rsp;
    check(rsp.valid == (op inside {OP_READ, OP_RAW_READ, OP_CNT_READ}), "one-cycle response latency");
    if (rsp.valid) begin
      @(posedge clk);
      #1;
      check(gpio[31:0] == last_rsp.data && gpio[32] == last_rsp.detected &&
            gpio[33] == last_rsp.corrected && gpio[34] == last_rsp.uncorrectable &&
            gpio[35] == last_rsp.rmu_mismatch && gpio_oeb == '0, "gpio shows the response");
      ev_count[EV_GPIO_UPDATE]++;
    end
  endtask

  task automatic write(addr_t r, prot_mode_e m, word_t x);
    issue(OP_WRITE, r, m, x);
    cnt_model[r][CNT_WRITES]++;
    if (m inside {MODE_TMR, MODE_ECC_SHADOW}) ev_count[EV_THREE_BANK_WRITE]++;
    if (m != MODE_NONE && r[2:0] == 3'd7) ev_count[EV_BANK_WRAP]++;
  endtask

  task automatic read(addr_t r, word_t exp, logic det, logic cor, logic unc, bit check_data, string what);
    issue(OP_READ, r);
    cnt_model[r][CNT_READS]++;
    if (det) cnt_model[r][CNT_DETECTED]++;
    if (cor) cnt_model[r][CNT_CORRECTED]++;
    if (check_data) check(last_rsp.data == exp, $sformatf("%s reg %0d: data %h expected %h", what, r, last_rsp.data, exp));
    check(last_rsp.detected == det && last_rsp.corrected == cor && last_rsp.uncorrectable == unc,
          $sformatf("%s reg %0d: flags %b%b%b", what, r, last_rsp.detected, last_rsp.corrected, last_rsp.uncorrectable));
  endtask

  task automatic flip(addr_t p, word_t mask);
    word_t v;
    issue(OP_RAW_READ, p);
    v = last_rsp.data;
    ev_count[EV_RAW_INSPECT]++;
    issue(OP_RAW_WRITE, p, MODE_NONE, v ^ mask);
    ev_count[EV_RAW_INJECT]++;
  endtask

  // One register: write it, read it clean, inject the mode's test errors and read again.
  task automatic exercise(addr_t r, prot_mode_e m);
    word_t x;
    x = $urandom;
    write(r, m, x);
    read(r, x, 0, 0, 0, 1, "clean");
    case (m)
      MODE_NONE: begin
        ev_count[EV_NONE_RW]++;
      end
      MODE_ECC: begin
        ev_count[EV_ECC_RW]++;
        flip(r, rand_bits(1, 32));
        read(r, x, 1, 1, 0, 1, "ecc single");
        ev_count[EV_ECC_CORRECT]++;
        write(r, m, x);
        flip(r, rand_bits(2, 32));
        read(r, x, 1, 0, 1, 0, "ecc double");
        ev_count[EV_ECC_DOUBLE]++;
      end
      MODE_TMR: begin
        ev_count[EV_TMR_RW]++;
        flip(copy_addr(r, $urandom_range(2)), $urandom | 32'h100);
        read(r, x, 1, 1, 0, 1, "tmr");
        ev_count[EV_TMR_CORRECT]++;
      end
      MODE_SHADOW: begin
        ev_count[EV_SHADOW_RW]++;
        flip(copy_addr(r, 1), rand_bits(1, 32));
        read(r, x, 1, 0, 1, 1, "shadow");
        ev_count[EV_SHADOW_DETECT]++;
      end
      MODE_ECC_SHADOW: begin
        ev_count[EV_ECCSH_RW]++;
        flip(r, $urandom | 32'h1);
        read(r, x, 1, 1, 0, 1, "ecc shadow primary");
        ev_count[EV_ECCSH_PRIMARY_FIX]++;
        write(r, m, x);
        flip(copy_addr(r, 1), rand_bits(1, 32));
        read(r, x, 1, 1, 0, 1, "ecc shadow single");
        ev_count[EV_ECCSH_SHADOW_FIX]++;
        write(r, m, x);
        flip(copy_addr(r, 1), rand_bits(2, 32));
        read(r, x, 1, 0, 1, 1, "ecc shadow double");
        ev_count[EV_ECCSH_UNCORR]++;
      end
      default: ;
    endcase
    // Leave the register clean again.
    write(r, m, x);
    read(r, x, 0, 0, 0, 1, "rewritten");
  endtask

  initial begin
    cmd_valid = 0;
    cmd = '0;
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < NUM_CNT; c++) cnt_model[r][c] = 0;
    for (int e = 0; e < EV_NUM; e++) ev_count[e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Every register in turn, the mode cycling through all five.
    for (int pass = 0; pass < 2; pass++)
      for (int r = 0; r < NUM_REGS; r++)
        exercise(addr_t'(r), prot_mode_e'((r + pass) % 5));

    // Read out all counters of the duplicated RMU.
    for (int r = 0; r < NUM_REGS; r++)
      for (int c = 0; c < NUM_CNT; c++) begin
        issue(OP_CNT_READ, addr_t'(r), MODE_NONE, '0, cnt_sel_e'(c));
        ev_count[EV_CNT_READ]++;
        check(last_rsp.data == cnt_model[r][c] && !last_rsp.rmu_mismatch,
              $sformatf("counter reg %0d sel %0d = %0d expected %0d", r, c, last_rsp.data, cnt_model[r][c]));
      end

    for (int e = 0; e < EV_NUM; e++) begin
      checks++;
      if (ev_count[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", ev_e'(e));
      end
    end
    $display("mechanisms: %p", ev_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
