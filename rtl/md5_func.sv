// md5_func: the round logic function of MD5.
//
// Round 0 (steps 0-15)  F = (B and C) or (not B and D)
// Round 1 (steps 16-31) G = (B and D) or (C and not D)
// Round 2 (steps 32-47) H = B xor C xor D
// Round 3 (steps 48-63) I = C xor (B or not D)
// These are the MD5 functions. G is the MD5 one; a variant of it that leaves
// C out, (B and D) or (B and not D), would reduce to B and is not used.
// Purely combinational, bitwise on 32-bit words.
module md5_func
  import md5_pkg::*;
(
  input  round_t round,
  input  word_t  b,
  input  word_t  c,
  input  word_t  d,
  output word_t  f
);

  always_comb begin
    unique case (round)
      ROUND_F: f = (b & c) | (~b & d);
      ROUND_G: f = (b & d) | (c & ~d);
      ROUND_H: f = b ^ c ^ d;
      ROUND_I: f = c ^ (b | ~d);
    endcase
  end

endmodule
