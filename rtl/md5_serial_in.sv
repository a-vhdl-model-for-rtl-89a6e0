// md5_serial_in: bit-serial message capture.
//
// While wr is high, one message bit is taken from data on every rising clock
// edge, least significant bit of the message first: the first bit lands in
// msg[0], the next in msg[1], and so on. The clock edge that sees wr rise
// starts a new message (it clears msg and stores the first bit). msg_len
// counts the bits taken; bits beyond MSG_BITS in one burst are dropped and
// the count stops at MSG_BITS. done is high, combinationally, during the
// first clock cycle in which wr is low after a burst, so a register loaded
// on that clock edge sees the complete message. msg and msg_len hold their
// values until the next burst. There is no reset: the first burst defines
// all state that done depends on once wr has been low for one clock.
// The port names and the bit order come from the original design; the
// start/end detection, the counter and the saturation are choices made here.
module md5_serial_in #(
  parameter int unsigned MSG_BITS = 4,
  localparam int unsigned LW      = $clog2(MSG_BITS + 1)
) (
  input  logic                clock,
  input  logic                wr,
  input  logic                data,
  output logic [MSG_BITS-1:0] msg,
  output logic [LW-1:0]       msg_len,
  output logic                done
);

  logic wr_q;

  always_ff @(posedge clock) begin
    wr_q <= wr;
    if (wr) begin
      if (!wr_q) begin
        msg     <= MSG_BITS'(data);
        msg_len <= LW'(1);
      end else if (int'(msg_len) < MSG_BITS) begin
        for (int i = 0; i < MSG_BITS; i++)
          if (i == int'(msg_len)) msg[i] <= data;
        msg_len <= msg_len + 1'b1;
      end
    end
  end

  assign done = wr_q & ~wr;

endmodule
