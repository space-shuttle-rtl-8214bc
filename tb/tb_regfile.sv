// tb_regfile: writes random words into random subsets of the 8 banks in the
// same cycle and reads every bank back at random rows, against a 32-entry
// reference model addressed as bank = p[2:0], row = p[4:3].
module tb_regfile;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  bank_wr_t [NUM_BANKS-1:0] wr;
  idx_t     [NUM_BANKS-1:0] ridx;
  word_t    [NUM_BANKS-1:0] rdata;
  word_t model [NUM_BANKS][REGS_PER_BANK];
  int checks = 0, failures = 0, parallel_writes = 0;

  regfile dut (.clk_i(clk), .rst_ni(rst_n), .wr_i(wr), .ridx_i(ridx), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < NUM_BANKS; b++) begin
      checks++;
      if (rdata[b] !== model[b][ridx[b]]) begin
        failures++;
        $display("FAIL bank %0d row %0d got %h expected %h", b, ridx[b], rdata[b], model[b][ridx[b]]);
      end
    end
  endtask

  initial begin
    wr = '0;
    ridx = '0;
    for (int b = 0; b < NUM_BANKS; b++)
      for (int i = 0; i < REGS_PER_BANK; i++) model[b][i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_all();
    for (int t = 0; t < 300; t++) begin
      int nwe;
      @(negedge clk);
      nwe = 0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        wr[b].we   = ($urandom_range(1) == 1);
        wr[b].idx  = idx_t'($urandom);
        wr[b].data = $urandom;
        ridx[b]    = idx_t'($urandom);
        nwe += int'(wr[b].we);
      end
      if (nwe > 1) parallel_writes++;
      @(posedge clk);
      for (int b = 0; b < NUM_BANKS; b++) if (wr[b].we) model[b][wr[b].idx] = wr[b].data;
      #1 check_all();
    end
    checks++;
    if (parallel_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
