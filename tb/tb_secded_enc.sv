// tb_secded_enc: checks the SECDED encoder against a reference that builds
// the full 39-bit extended Hamming codeword bit by bit, for fixed and random
// words, and checks that every codeword it produces has even overall parity.
module tb_secded_enc;
  import ss_pkg::*;

  word_t data;
  ecc_t  ecc;
  int checks = 0, failures = 0;

  secded_enc dut (.data_i(data), .ecc_o(ecc));

  // Reference: place data at non-power-of-two positions 1..38 of a codeword,
  // then parity bit 2^k covers every position with bit k set.
  function automatic ecc_t ref_ecc(word_t d);
    logic [38:0] cw;
    int n = 0;
    ecc_t e;
    cw = '0;
    for (int p = 1; p <= 38; p++)
      if ((p & (p - 1)) != 0) begin cw[p] = d[n]; n++; end
    for (int k = 0; k < 6; k++) begin
      e[k] = 1'b0;
      for (int p = 1; p <= 38; p++) if (p[k]) e[k] ^= cw[p];
    end
    e[6] = ^{d, e[5:0]};
    return e;
  endfunction

  task automatic check(word_t d);
    data = d;
    #1;
    checks++;
    if (ecc !== ref_ecc(d)) begin
      failures++;
      $display("FAIL data=%h ecc=%h expected %h", d, ecc, ref_ecc(d));
    end
    checks++;
    if (^{data, ecc} !== 1'b0) begin
      failures++;
      $display("FAIL odd codeword parity for %h", d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    checks++;
    if (ecc !== 7'h00) failures++;
    check(32'h1);        // data bit 0 at position 3 -> p1, p2 and overall
    checks++;
    if (ecc !== 7'h43) begin failures++; $display("FAIL ecc(1)=%h", ecc); end
    check('1);
    for (int i = 0; i < 32; i++) check(word_t'(1) << i);
    for (int i = 0; i < 500; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
