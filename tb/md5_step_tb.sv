// md5_step_tb: one instance of the step for a step of each round (and the
// first and last step), driven with random states and message words and
// compared with the reference step.
module md5_step_tb;
  import md5_pkg::*;
  import md5_ref_pkg::*;

  localparam int NS = 6;
  localparam int STEP_OF [NS] = '{0, 13, 21, 38, 50, 63};

  state_t st_i;
  state_t st_o [NS];
  word_t  x [BLOCK_WORDS];
  w32_t   xr [16];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NS; g++) begin : g_dut
    md5_step #(.STEP(STEP_OF[g])) dut (.state_i(st_i), .x(x), .state_o(st_o[g]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      st_i = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 16; w++) begin x[w] = $urandom; xr[w] = x[w]; end
      #1;
      for (int g = 0; g < NS; g++) begin
        logic [127:0] exp;
        exp = ref_step(STEP_OF[g], st_i, xr);
        checks++;
        if (st_o[g] !== exp) begin
          failures++;
          $display("step %0d: %h expected %h", STEP_OF[g], st_o[g], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
