// tmr_voter: bitwise two-out-of-three majority vote over the three copies of
// a triplicated register. mismatch_o is set when any copy differs from the
// others, i.e. when the vote had something to correct. A bit flipped in two
// copies at once is out-voted silently, as with any triple redundancy.
// Purely combinational; the voting scheme is the standard one, as the
// published design names triple redundancy without giving its insides.
module tmr_voter
  import ss_pkg::*;
(
  input  word_t a_i,
  input  word_t b_i,
  input  word_t c_i,
  output word_t vote_o,
  output logic  mismatch_o
);

  assign vote_o     = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);
  assign mismatch_o = (a_i != b_i) || (a_i != c_i);

endmodule
