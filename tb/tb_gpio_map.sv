// tb_gpio_map: random responses (some cycles without one) must appear on the
// pins one cycle later in the documented bit positions and hold until the
// next response; the toggle pin flips once per response and the output
// enable drives all pins.
module tb_gpio_map;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  rsp_t rsp;
  logic oe;
  logic [NUM_GPIO-1:0] gpio, oeb;
  int checks = 0, failures = 0;

  gpio_map dut (.clk_i(clk), .rst_ni(rst_n), .rsp_i(rsp), .oe_i(oe), .gpio_o(gpio), .gpio_oeb_o(oeb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rsp_t held;
    logic tog;
    rsp = '0;
    oe = 0;
    held = '0;
    tog = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      rsp = rsp_t'({$urandom, $urandom});
      rsp.valid = ($urandom_range(2) == 0);
      oe = $urandom_range(1);
      @(posedge clk);
      if (rsp.valid) begin held = rsp; tog = ~tog; end
      #1;
      checks++;
      if (gpio[31:0] !== held.data || gpio[32] !== held.detected || gpio[33] !== held.corrected ||
          gpio[34] !== held.uncorrectable || gpio[35] !== held.rmu_mismatch ||
          gpio[36] !== rsp.valid || gpio[37] !== tog) begin
        failures++;
        $display("FAIL gpio %h", gpio);
      end
      checks++;
      if (oeb !== {NUM_GPIO{~oe}}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
