// md5_top_tb: end-to-end test of the engine at its default size (4-bit
// messages, 1024-bit frame). It sends every message of 1 to 4 bits, in
// random order, with random gaps and some bursts longer than 4 bits, and
// compares G1 with the reference model. It checks that G1 changes on the
// first clock edge with wr low and not before. It counts how often each
// mechanism occurred: full-length and short messages (length counting),
// over-long bursts (length saturating), back-to-back messages one idle
// cycle apart, and the two-block chaining (each message). The 16 four-bit
// messages are the set of examples the original design was tested with;
// two of them are also compared with digests computed apart from the
// reference model.
module md5_top_tb;
  import md5_ref_pkg::*;

  logic         clock = 1'b0;
  logic         wr = 1'b0;
  logic         data = 1'b0;
  logic [127:0] G1;
  int checks = 0, failures = 0;
  int n_full = 0, n_short = 0, n_over = 0, n_b2b = 0, n_chain = 0;

  md5_top dut (.clock(clock), .wr(wr), .data(data), .G1(G1));

  always #10 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [5:0] bits, int len, int gap);
    int eff;
    logic [127:0] exp, g1_prev;
    eff = (len > 4) ? 4 : len;
    exp = ref_digest(512'(bits & 6'((1 << eff) - 1)), eff, 2);
    for (int b = 0; b < len; b++) begin
      wr = 1'b1; data = bits[b];
      @(negedge clock);
    end
    g1_prev = G1;
    wr = 1'b0; data = 1'($urandom);
    checks++;
    if (G1 !== g1_prev) begin failures++; $display("G1 changed before wr fell"); end
    @(negedge clock);
    checks++;
    if (G1 !== exp) begin
      failures++;
      $display("len %0d msg %b: %h expected %h", len, bits, G1, exp);
    end
    n_chain++;
    if (len > 4) n_over++;
    else if (len == 4) n_full++;
    else n_short++;
    if (gap == 1) n_b2b++;
    for (int g = 1; g < gap; g++) @(negedge clock);
  endtask

  initial begin
    int order [$];
    repeat (2) @(negedge clock);
    // the sixteen 4-bit messages and all shorter ones, shuffled
    for (int len = 1; len <= 4; len++)
      for (int m = 0; m < (1 << len); m++) order.push_back(len * 16 + m);
    order.shuffle();
    foreach (order[n]) send(6'(order[n] % 16), order[n] / 16, 1 + ($urandom % 3));
    for (int n = 0; n < 6; n++) send(6'($urandom), 5 + (n % 2), 1);
    // known answers for two 4-bit messages, computed apart from the model
    send(6'b1010, 4, 2);
    checks++;
    if (G1 !== 128'h1A2F9D540E847C0EEC6BD03A3CA32E11) begin failures++; $display("1010: %h", G1); end
    send(6'b1111, 4, 2);
    checks++;
    if (G1 !== 128'h874BD6CBABC736958055E5654B8CB4EB) begin failures++; $display("1111: %h", G1); end
    $display("full=%0d short=%0d overlong=%0d back_to_back=%0d two_block=%0d",
             n_full, n_short, n_over, n_b2b, n_chain);
    if (n_full == 0 || n_short == 0 || n_over == 0 || n_b2b == 0 || n_chain == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
