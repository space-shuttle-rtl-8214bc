// tb_ref_pkg: reference functions for the testbenches, written independently
// of the RTL: the extended Hamming (39,32) check bits built from an explicit
// codeword, and the physical address of copy k of a register (same row,
// bank + k modulo 8).
package tb_ref_pkg;
  import ss_pkg::*;

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

  function automatic addr_t copy_addr(addr_t r, int k);
    logic [2:0] b;
    b = r[2:0] + 3'(k);
    return {r[4:3], b};
  endfunction

  // A random mask with exactly n bits set among the low w bits.
  function automatic word_t rand_bits(int n, int w);
    word_t m = '0;
    while ($countones(m) < n) m[$urandom_range(w - 1)] = 1'b1;
    return m;
  endfunction
endpackage
