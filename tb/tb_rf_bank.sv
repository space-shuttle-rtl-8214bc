// tb_rf_bank: random writes and reads against a reference array; checks the
// reset value, that a write is visible in the next cycle and that a cycle
// without write enable leaves the bank unchanged.
module tb_rf_bank;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  logic we;
  idx_t widx, ridx;
  word_t wdata, rdata;
  word_t model [REGS_PER_BANK];
  int checks = 0, failures = 0;

  rf_bank dut (.clk_i(clk), .rst_ni(rst_n), .we_i(we), .widx_i(widx), .wdata_i(wdata),
               .ridx_i(ridx), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; widx = 0; wdata = 0; ridx = 0;
    for (int i = 0; i < REGS_PER_BANK; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < REGS_PER_BANK; i++) begin
      ridx = idx_t'(i);
      #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL reset value reg %0d", i); end
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = ($urandom_range(2) != 0);
      widx = idx_t'($urandom);
      wdata = $urandom;
      ridx = idx_t'($urandom);
      @(posedge clk);
      if (we) model[widx] = wdata;
      #1;
      checks++;
      if (rdata !== model[ridx]) begin
        failures++;
        $display("FAIL read reg %0d got %h expected %h", ridx, rdata, model[ridx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
