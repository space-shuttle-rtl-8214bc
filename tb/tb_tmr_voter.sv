// tb_tmr_voter: three equal copies must vote to the value with no mismatch;
// random bits flipped in any one copy must be out-voted and flagged.
module tb_tmr_voter;
  import ss_pkg::*;

  word_t a, b, c, v;
  logic  mm;
  int checks = 0, failures = 0;

  tmr_voter dut (.a_i(a), .b_i(b), .c_i(c), .vote_o(v), .mismatch_o(mm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      word_t x, flip;
      int which;
      x = $urandom;
      flip = $urandom;
      if (flip == '0) flip = 32'h8000_0000;
      which = t % 4;
      a = x; b = x; c = x;
      case (which)
        1: a = x ^ flip;
        2: b = x ^ flip;
        3: c = x ^ flip;
        default: ;
      endcase
      #1;
      checks++;
      if (v !== x || mm !== (which != 0)) begin
        failures++;
        $display("FAIL copy %0d flipped %h: vote %h mm %b", which, flip, v, mm);
      end
    end
    // Two copies flipped in different bits: every bit still has a majority.
    a = 32'hFFFF_0000 ^ 32'h1; b = 32'hFFFF_0000 ^ 32'h2; c = 32'hFFFF_0000;
    #1;
    checks++;
    if (v !== 32'hFFFF_0000 || !mm) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
