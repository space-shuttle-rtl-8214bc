// tb_secded_dec: encodes random words, then checks the decoder on the clean
// codeword, on every single-bit flip of the 39 stored bits (must be corrected)
// and on random double-bit flips (must be flagged, never "corrected").
module tb_secded_dec;
  import ss_pkg::*;

  word_t d_in, d_out, clean;
  ecc_t  e_in, e_clean;
  logic  single, double;
  int checks = 0, failures = 0;

  secded_enc u_enc (.data_i(clean), .ecc_o(e_clean));
  secded_dec dut (.data_i(d_in), .ecc_i(e_in), .data_o(d_out), .single_o(single), .double_o(double));

  task automatic expect_result(string what, word_t exp_d, logic exp_s, logic exp_d2, logic check_data);
    #1;
    checks++;
    if (single !== exp_s || double !== exp_d2 || (check_data && d_out !== exp_d)) begin
      failures++;
      $display("FAIL %s: data %h->%h single=%b double=%b", what, d_in, d_out, single, double);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      logic [38:0] cw, bad;
      clean = (t == 0) ? '0 : $urandom;
      #1;
      cw = {e_clean, clean};
      {e_in, d_in} = cw;
      expect_result("clean", clean, 1'b0, 1'b0, 1'b1);
      for (int b = 0; b < 39; b++) begin
        bad = cw;
        bad[b] = ~bad[b];
        {e_in, d_in} = bad;
        expect_result("single", clean, 1'b1, 1'b0, 1'b1);
      end
      for (int k = 0; k < 20; k++) begin
        int b1, b2;
        b1 = $urandom_range(38);
        b2 = (b1 + 1 + $urandom_range(37)) % 39;
        bad = cw;
        bad[b1] = ~bad[b1];
        bad[b2] = ~bad[b2];
        {e_in, d_in} = bad;
        expect_result("double", clean, 1'b0, 1'b1, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
