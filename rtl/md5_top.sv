// md5_top: MD5 hash engine with a bit-serial message input.
//
// A message of up to MSG_BITS bits is shifted in on data while wr is high,
// least significant bit first (md5_serial_in). It is padded into a frame of
// NBLK 512-bit blocks (md5_padder), and the blocks are compressed one after
// the other (md5_compress), the first starting from the MD5 initial values
// A = 67452301, B = efcdab89, C = 98badcfe, D = 10325476 and each later one
// from the result of the block before. The hashing datapath is entirely
// combinational, NBLK*64 steps deep; only the input and the result are
// registered. On the first rising clock edge with wr low after a burst, the
// result is loaded into G1 with D in the most significant word and A in the
// least: G1 = {D, C, B, A}. G1 then holds until the next message ends.
//
// Defaults follow the original design: 4-bit messages in a 1024-bit frame
// (two blocks). Ports are clock, wr, data and G1 only; there is no reset,
// and G1 is undefined until the first message has been hashed. The
// combinational path from the message register to G1 has to settle within
// one clock period; the original ran at 50 MHz on a Spartan-3A FPGA.
module md5_top
  import md5_pkg::*;
#(
  parameter int unsigned MSG_BITS = 4,
  parameter int unsigned NBLK     = 2,
  localparam int unsigned LW      = $clog2(MSG_BITS + 1)
) (
  input  logic         clock,
  input  logic         wr,
  input  logic         data,
  output logic [127:0] G1
);

  logic [MSG_BITS-1:0] msg;
  logic [LW-1:0]       msg_len;
  logic                done;
  word_t               x [NBLK*BLOCK_WORDS];
  state_t              h [NBLK+1];

  md5_serial_in #(.MSG_BITS(MSG_BITS)) u_in (
    .clock   (clock),
    .wr      (wr),
    .data    (data),
    .msg     (msg),
    .msg_len (msg_len),
    .done    (done)
  );

  md5_padder #(.MSG_BITS(MSG_BITS), .NBLK(NBLK)) u_pad (
    .msg     (msg),
    .msg_len (msg_len),
    .x       (x)
  );

  assign h[0] = MD5_IV;

  for (genvar j = 0; j < NBLK; j++) begin : g_blk
    word_t xb [BLOCK_WORDS];
    for (genvar w = 0; w < BLOCK_WORDS; w++) begin : g_w
      assign xb[w] = x[j*BLOCK_WORDS + w];
    end
    md5_compress u_cmp (
      .h_in  (h[j]),
      .x     (xb),
      .h_out (h[j+1])
    );
  end

  always_ff @(posedge clock) begin
    if (done) G1 <= {h[NBLK].d, h[NBLK].c, h[NBLK].b, h[NBLK].a};
  end

endmodule
