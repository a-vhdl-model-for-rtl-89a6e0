// md5_top_rfc_tb: the engine configured for standard MD5 padding (one
// 512-bit block, messages up to 24 bits) hashes "a" and "abc" sent bit by
// bit and is compared with the published digests
// 0cc175b9c0f1b6a831c399e269772661 and 900150983cd24fb0d6963f7d28e17f72,
// then with the reference model for random messages of every length.
module md5_top_rfc_tb;
  import md5_ref_pkg::*;

  logic         clock = 1'b0;
  logic         wr = 1'b0;
  logic         data = 1'b0;
  logic [127:0] G1;
  int checks = 0, failures = 0;

  md5_top #(.MSG_BITS(24), .NBLK(1)) dut (.clock(clock), .wr(wr), .data(data), .G1(G1));

  always #10 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bits[len-1] is the first bit of the string; it is sent last
  task automatic send_check(logic [23:0] bits, int len, logic [127:0] exp, string what);
    for (int b = 0; b < len; b++) begin
      wr = 1'b1; data = bits[b];
      @(negedge clock);
    end
    wr = 1'b0;
    @(negedge clock);
    checks++;
    if (G1 !== exp) begin failures++; $display("%s: %h expected %h", what, G1, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clock);
    send_check(24'h61, 8, hex_to_out(128'h0cc175b9c0f1b6a831c399e269772661), "a");
    send_check(24'h616263, 24, hex_to_out(128'h900150983cd24fb0d6963f7d28e17f72), "abc");
    for (int len = 1; len <= 24; len++) begin
      logic [23:0] m;
      m = 24'($urandom) & 24'((1 << len) - 1);
      send_check(m, len, ref_digest(512'(m), len, 1), $sformatf("random len %0d", len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
