// md5_step: one of the 64 steps of the MD5 compression function.
//
//   A' = B + ((A + f(B,C,D) + X[k] + T[i]) <<< s)
//   then, all at once: A <= D, B <= A', C <= B, D <= C
//
// The step number is the parameter STEP (0..63); it fixes the round function,
// k, s and T[i] at elaboration, so the instance is an adder chain, a logic
// function and a fixed rotation. The block receives all 16 words of the
// current 512-bit block and picks X[k] itself. Purely combinational.
// The register shuffle is a simultaneous transfer, as in MD5: every output
// word is taken from the old state, and the whole sum is rotated.
module md5_step
  import md5_pkg::*;
#(
  parameter int unsigned STEP = 0
) (
  input  state_t state_i,
  input  word_t  x [BLOCK_WORDS],
  output state_t state_o
);

  logic [3:0] k;
  logic [4:0] s;
  word_t      t;
  word_t      f;
  word_t      sum;
  word_t      rot;

  md5_const_rom u_rom (
    .i (6'(STEP)),
    .k (k),
    .s (s),
    .t (t)
  );

  md5_func u_func (
    .round (round_t'(STEP / 16)),
    .b     (state_i.b),
    .c     (state_i.c),
    .d     (state_i.d),
    .f     (f)
  );

  assign sum = state_i.a + f + x[k] + t;
  // Left rotation by s; s is never 0, so the right shift stays below 32.
  assign rot = (sum << s) | (sum >> (6'd32 - 6'(s)));

  assign state_o.a = state_i.d;
  assign state_o.b = state_i.b + rot;
  assign state_o.c = state_i.b;
  assign state_o.d = state_i.c;

  initial assert (STEP < STEPS) else $error("md5_step: STEP %0d out of range", STEP);

endmodule
