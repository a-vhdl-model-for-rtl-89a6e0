// md5_serial_in_tb: sends bursts of 1..6 bits (longer than the 4-bit
// capacity included) with gaps of 1..3 clocks between them, and checks the
// captured message, its length and that done is high for exactly the first
// low-wr cycle after each burst.
module md5_serial_in_tb;

  logic       clock = 1'b0;
  logic       wr = 1'b0;
  logic       data = 1'b0;
  logic [3:0] msg;
  logic [2:0] msg_len;
  logic       done;
  int checks = 0, failures = 0;

  md5_serial_in dut (.clock(clock), .wr(wr), .data(data), .msg(msg), .msg_len(msg_len), .done(done));

  always #10 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clock);
    for (int n = 0; n < 300; n++) begin
      int len, gap, exp_len;
      logic [5:0] bits;
      logic [3:0] exp_msg;
      len  = 1 + ($urandom % 6);
      gap  = 1 + ($urandom % 3);
      bits = 6'($urandom);
      for (int b = 0; b < len; b++) begin
        wr = 1'b1; data = bits[b];
        @(negedge clock);
        checks++;
        if (done) begin failures++; $display("done high during burst"); end
      end
      wr = 1'b0; data = 1'($urandom);
      exp_len = (len > 4) ? 4 : len;
      exp_msg = bits[3:0] & 4'((1 << exp_len) - 1);
      #1;
      checks += 3;
      if (!done) begin failures++; $display("done missing after burst %0d", n); end
      if (int'(msg_len) != exp_len) begin failures++; $display("len %0d expected %0d", msg_len, exp_len); end
      if ((msg & 4'((1 << exp_len) - 1)) !== exp_msg) begin failures++; $display("msg %b expected %b", msg, exp_msg); end
      @(negedge clock);
      for (int g = 1; g < gap; g++) begin
        checks++;
        if (done) begin failures++; $display("done longer than one cycle"); end
        @(negedge clock);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
