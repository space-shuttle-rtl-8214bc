// secded_enc: check bits of an extended Hamming (39,32) code, single-error
// correcting and double-error detecting (SECDED).
//
// The 32 data bits occupy Hamming positions 3,5,6,7,9,... up to 38, skipping
// the powers of two. Check bit k (k = 0..5) is the parity of every data bit
// whose position has bit k set; check bit 6 is the parity of all 32 data bits
// and the six Hamming bits, which lets the decoder tell one error from two.
// The SECDED capability follows the published design; the particular code
// (extended Hamming) is this design's own choice. Purely combinational.
module secded_enc
  import ss_pkg::*;
(
  input  word_t data_i,
  output ecc_t  ecc_o
);

  always_comb begin
    logic [ECC_W-2:0] ham;
    ham = '0;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      for (int unsigned k = 0; k < ECC_W - 1; k++) begin
        if (((ecc_data_pos(i) >> k) & 1) != 0) ham[k] ^= data_i[i];
      end
    end
    ecc_o = {(^data_i) ^ (^ham), ham};
  end

endmodule
