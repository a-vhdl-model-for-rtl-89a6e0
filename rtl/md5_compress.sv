// md5_compress: MD5 compression of one 512-bit block.
//
// The chaining value h_in = {A,B,C,D} is kept aside (AA, BB, CC, DD), passed
// through the 64 steps in a chain of md5_step instances, and the result is
// added word by word to the kept value: A+AA, B+BB, C+CC, D+DD. The whole
// block is combinational: 64 steps of four 32-bit additions each, plus the
// final four additions. x[0..15] are the block's words X[0..15].
module md5_compress
  import md5_pkg::*;
(
  input  state_t h_in,
  input  word_t  x [BLOCK_WORDS],
  output state_t h_out
);

  state_t chain [STEPS+1];

  assign chain[0] = h_in;

  for (genvar g = 0; g < STEPS; g++) begin : g_step
    md5_step #(.STEP(g)) u_step (
      .state_i (chain[g]),
      .x       (x),
      .state_o (chain[g+1])
    );
  end

  assign h_out.a = chain[STEPS].a + h_in.a;
  assign h_out.b = chain[STEPS].b + h_in.b;
  assign h_out.c = chain[STEPS].c + h_in.c;
  assign h_out.d = chain[STEPS].d + h_in.d;

endmodule
