// md5_padder: builds the padded message frame M and splits it into words.
//
// The message is msg_len bits long (msg_len <= MSG_BITS); bit i of msg is
// the i-th bit received, so the most significant received bit,
// msg[msg_len-1], is the first bit of the message bit string. The frame is
// the message, a single 1, zeros up to NBLK*512-64 bits, then the length in
// bits as a 64-bit number. The frame size is fixed by NBLK, not derived
// from the length: the default, a 4-bit message in a 1024-bit frame, keeps
// the two-block frame of the original design, while NBLK = 1 gives the
// standard MD5 padding for messages up to 447 bits.
//
// Bit string to words follows MD5: the first bit is the most significant bit
// of byte 0, four bytes form a word with byte 0 in bits 7:0, and the length
// goes low word first into the last two words. Purely combinational.
module md5_padder
  import md5_pkg::*;
#(
  parameter int unsigned MSG_BITS = 4,
  parameter int unsigned NBLK     = 2,
  localparam int unsigned LW      = $clog2(MSG_BITS + 1),
  localparam int unsigned NWORDS  = NBLK * BLOCK_WORDS
) (
  input  logic [MSG_BITS-1:0] msg,
  input  logic [LW-1:0]       msg_len,
  output word_t               x [NWORDS]
);

  always_comb begin
    for (int w = 0; w < NWORDS; w++) x[w] = '0;
    // Message bits and the padding 1: bit string positions 0..MSG_BITS.
    for (int p = 0; p <= MSG_BITS; p++) begin
      int  idx;
      logic bit_v;
      idx = int'(msg_len) - 1 - p;
      if (idx >= 0) bit_v = msg[idx];
      else          bit_v = (p == int'(msg_len));
      // byte p/8, bit 7-(p%8) of the byte; byte b sits at word b/4, bits 8*(b%4)+
      x[p / 32][8 * ((p / 8) % 4) + 7 - (p % 8)] = bit_v;
    end
    x[NWORDS-2] = 32'(msg_len);
    x[NWORDS-1] = '0;
  end

  initial assert (MSG_BITS >= 1 && MSG_BITS + 65 <= NBLK * 512)
    else $error("md5_padder: MSG_BITS %0d does not fit %0d blocks", MSG_BITS, NBLK);

endmodule
