// tb_rmu: random event streams (any mix of the four events, random register)
// against a reference array of counters; every counter of every register is
// read back through the read-out port at the end and some on the way.
module tb_rmu;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  rmu_evt_t evt;
  addr_t rd_addr;
  cnt_sel_e rd_sel;
  cnt_t rd_cnt;
  int unsigned model [NUM_REGS][NUM_CNT];
  int checks = 0, failures = 0;

  rmu dut (.clk_i(clk), .rst_ni(rst_n), .evt_i(evt), .rd_addr_i(rd_addr), .rd_sel_i(rd_sel), .rd_cnt_o(rd_cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cnt(int r, int c);
    rd_addr = addr_t'(r);
    rd_sel = cnt_sel_e'(c);
    #1;
    checks++;
    if (rd_cnt !== cnt_t'(model[r][c])) begin
      failures++;
      $display("FAIL reg %0d counter %0d = %0d expected %0d", r, c, rd_cnt, model[r][c]);
    end
  endtask

  initial begin
    evt = '0;
    rd_addr = '0;
    rd_sel = CNT_WRITES;
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < NUM_CNT; c++) model[r][c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      evt.addr = addr_t'($urandom_range(7) == 0 ? 5 : $urandom);  // register 5 gets extra traffic
      evt.wr  = $urandom_range(1);
      evt.rd  = $urandom_range(1);
      evt.det = $urandom_range(1);
      evt.cor = $urandom_range(1);
      @(posedge clk);
      if (evt.wr)  model[evt.addr][CNT_WRITES]++;
      if (evt.rd)  model[evt.addr][CNT_READS]++;
      if (evt.det) model[evt.addr][CNT_DETECTED]++;
      if (evt.cor) model[evt.addr][CNT_CORRECTED]++;
      #1 check_cnt($urandom_range(NUM_REGS - 1), $urandom_range(NUM_CNT - 1));
    end
    @(negedge clk);
    evt = '0;
    for (int r = 0; r < NUM_REGS; r++) for (int c = 0; c < NUM_CNT; c++) check_cnt(r, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
