// md5_compress_tb: compresses the padded one-block message "abc" from the
// MD5 initial values and compares with the published digest
// 900150983cd24fb0d6963f7d28e17f72, then compares random blocks and random
// chaining values with the reference model.
module md5_compress_tb;
  import md5_pkg::*;
  import md5_ref_pkg::*;

  state_t h_in, h_out;
  word_t  x [BLOCK_WORDS];
  w32_t   xr [16];
  int checks = 0, failures = 0;

  md5_compress dut (.h_in(h_in), .x(x), .h_out(h_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp, got;
    // "abc" = 61 62 63, then 0x80, zeros, length 24 in word 14
    h_in = 128'h67452301_efcdab89_98badcfe_10325476;
    foreach (x[w]) x[w] = '0;
    x[0]  = 32'h80636261;
    x[14] = 32'd24;
    #1;
    got = {h_out.d, h_out.c, h_out.b, h_out.a};
    exp = hex_to_out(128'h900150983cd24fb0d6963f7d28e17f72);
    checks++;
    if (got !== exp) begin failures++; $display("abc: %h expected %h", got, exp); end

    for (int n = 0; n < 50; n++) begin
      h_in = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 16; w++) begin x[w] = $urandom; xr[w] = x[w]; end
      #1;
      exp = ref_compress(h_in, xr);
      checks++;
      if (h_out !== exp) begin failures++; $display("random %0d: %h expected %h", n, h_out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
