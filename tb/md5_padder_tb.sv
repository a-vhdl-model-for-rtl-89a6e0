// md5_padder_tb: checks the padded frame word by word against the
// byte-oriented reference padding, for the default 4-bit/two-block frame
// (every message of every length) and for a 40-bit/one-block frame with
// random messages of every length.
module md5_padder_tb;
  import md5_pkg::*;
  import md5_ref_pkg::*;

  logic [3:0]  msg_a;
  logic [2:0]  len_a;
  word_t       x_a [32];
  logic [39:0] msg_b;
  logic [5:0]  len_b;
  word_t       x_b [16];
  int checks = 0, failures = 0;

  md5_padder dut_a (.msg(msg_a), .msg_len(len_a), .x(x_a));
  md5_padder #(.MSG_BITS(40), .NBLK(1)) dut_b (.msg(msg_b), .msg_len(len_b), .x(x_b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32_t xr [32];
    for (int len = 1; len <= 4; len++)
      for (int m = 0; m < (1 << len); m++) begin
        msg_a = 4'(m) | ($urandom << len); // bits above len are don't care
        len_a = 3'(len);
        #1;
        ref_pad(512'(m), len, 2, xr);
        for (int w = 0; w < 32; w++) begin
          checks++;
          if (x_a[w] !== xr[w]) begin
            failures++;
            $display("4-bit len %0d msg %h word %0d: %h expected %h", len, m, w, x_a[w], xr[w]);
          end
        end
      end
    for (int len = 1; len <= 40; len++)
      repeat (4) begin
        logic [39:0] m;
        m = {$urandom, $urandom};
        msg_b = m;
        len_b = 6'(len);
        m = m & ((40'd1 << len) - 1);
        #1;
        ref_pad(512'(m), len, 1, xr);
        for (int w = 0; w < 16; w++) begin
          checks++;
          if (x_b[w] !== xr[w]) begin
            failures++;
            $display("40-bit len %0d word %0d: %h expected %h", len, w, x_b[w], xr[w]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
