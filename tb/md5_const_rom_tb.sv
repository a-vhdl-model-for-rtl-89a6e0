// md5_const_rom_tb: checks all 64 entries of the step constants.
// T[i] is compared with floor(|sin(i+1)| * 2^32) computed here, k and s with
// the word-order and rotation tables of the reference model.
module md5_const_rom_tb;
  import md5_ref_pkg::*;

  logic [5:0]  i;
  logic [3:0]  k;
  logic [4:0]  s;
  logic [31:0] t;
  int checks = 0, failures = 0;

  md5_const_rom dut (.i(i), .k(k), .s(s), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      i = 6'(n);
      #1;
      checks += 3;
      if (t !== ref_t(n)) begin failures++; $display("T[%0d] %h expected %h", n, t, ref_t(n)); end
      if (int'(k) != ref_k(n)) begin failures++; $display("k[%0d] %0d expected %0d", n, k, ref_k(n)); end
      if (int'(s) != ref_s(n)) begin failures++; $display("s[%0d] %0d expected %0d", n, s, ref_s(n)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
