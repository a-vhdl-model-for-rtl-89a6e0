// md5_func_tb: compares the four round functions with a bit-by-bit
// reference (F: b ? c : d, G: d ? b : c, H: parity, I: c xor (b or not d))
// on corner and random operands.
module md5_func_tb;
  import md5_pkg::*;
  import md5_ref_pkg::*;

  round_t round;
  word_t  b, c, d, f;
  int checks = 0, failures = 0;

  md5_func dut (.round(round), .b(b), .c(c), .d(d), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(word_t bb, word_t cc, word_t dd);
    for (int r = 0; r < 4; r++) begin
      round = round_t'(r); b = bb; c = cc; d = dd;
      #1;
      checks++;
      if (f !== ref_f(r, bb, cc, dd)) begin
        failures++;
        $display("round %0d b=%h c=%h d=%h: %h expected %h", r, bb, cc, dd, f, ref_f(r, bb, cc, dd));
      end
    end
  endtask

  initial begin
    // every combination of one bit column
    for (int m = 0; m < 8; m++)
      try({32{m[2]}}, {32{m[1]}}, {32{m[0]}});
    for (int n = 0; n < 200; n++) try($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
