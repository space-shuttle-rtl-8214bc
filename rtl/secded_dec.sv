// secded_dec: checks a 32-bit word against its 7 extended Hamming check bits
// (see secded_enc) and corrects one flipped bit.
//
// The 6-bit syndrome is the recomputed Hamming parity XOR the stored one; it
// names the Hamming position of a single flipped bit. The overall parity over
// all 39 stored bits separates the cases:
//   syndrome 0, parity even  -> no error
//   parity odd               -> single error: flip the data bit at the
//                               syndrome position (a flipped check bit needs
//                               no data change); a syndrome beyond position 38
//                               cannot come from one error and counts as double
//   syndrome != 0, even      -> double error, data returned as stored
// Purely combinational.
module secded_dec
  import ss_pkg::*;
(
  input  word_t data_i,
  input  ecc_t  ecc_i,
  output word_t data_o,
  output logic  single_o,  // one error, corrected
  output logic  double_o   // two (or an impossible pattern of) errors, not corrected
);

  logic [ECC_W-2:0] syn;
  logic             par_odd;

  always_comb begin
    syn = ecc_i[ECC_W-2:0];
    for (int unsigned i = 0; i < DATA_W; i++) begin
      for (int unsigned k = 0; k < ECC_W - 1; k++) begin
        if (((ecc_data_pos(i) >> k) & 1) != 0) syn[k] ^= data_i[i];
      end
    end
    par_odd = (^data_i) ^ (^ecc_i);

    data_o   = data_i;
    single_o = 1'b0;
    double_o = 1'b0;
    if (par_odd) begin
      if (int'(syn) > CW_LAST) begin
        double_o = 1'b1;
      end else begin
        single_o = 1'b1;
        for (int unsigned i = 0; i < DATA_W; i++) begin
          if (int'(syn) == ecc_data_pos(i)) data_o[i] = ~data_i[i];
        end
      end
    end else if (syn != '0) begin
      double_o = 1'b1;
    end
  end

endmodule
