// gpio_map: drives the user GPIO pins with the last response, so the stored
// word and the result of its verification can be watched from outside the
// chip. The pins are registered and hold their value until the next response:
//   gpio[31:0]  data word
//   gpio[32]    error detected
//   gpio[33]    error corrected
//   gpio[34]    uncorrectable error
//   gpio[35]    RMU copies disagree
//   gpio[36]    response valid (one-cycle pulse)
//   gpio[37]    toggles on every response, for a slow external sampler
// gpio_oeb_o is active-low output enable, all pins driven when oe_i is set.
// Sending the memory output and verification result to GPIO follows the
// published design; the pin assignment is this design's own.
module gpio_map
  import ss_pkg::*;
(
  input  logic                clk_i,
  input  logic                rst_ni,
  input  rsp_t                rsp_i,
  input  logic                oe_i,
  output logic [NUM_GPIO-1:0] gpio_o,
  output logic [NUM_GPIO-1:0] gpio_oeb_o
);

  word_t data_q;
  logic  det_q, cor_q, unc_q, mis_q, valid_q, toggle_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      data_q   <= '0;
      det_q    <= 1'b0;
      cor_q    <= 1'b0;
      unc_q    <= 1'b0;
      mis_q    <= 1'b0;
      valid_q  <= 1'b0;
      toggle_q <= 1'b0;
    end else begin
      valid_q <= rsp_i.valid;
      if (rsp_i.valid) begin
        data_q   <= rsp_i.data;
        det_q    <= rsp_i.detected;
        cor_q    <= rsp_i.corrected;
        unc_q    <= rsp_i.uncorrectable;
        mis_q    <= rsp_i.rmu_mismatch;
        toggle_q <= ~toggle_q;
      end
    end
  end

  assign gpio_o     = {toggle_q, valid_q, mis_q, unc_q, cor_q, det_q, data_q};
  assign gpio_oeb_o = {NUM_GPIO{~oe_i}};

endmodule
