// md5_pkg: types and constants shared by the MD5 engine.
//
// The chaining state of MD5 is four 32-bit words A, B, C, D. It is carried
// between the blocks of the design as one packed struct, with A in the most
// significant word. The initial values of the four registers are the ones
// of MD5 (A = 67452301, B = efcdab89, C = 98badcfe, D = 10325476). The
// round index selects one of the four logic functions F, G, H, I.
package md5_pkg;

  typedef logic [31:0] word_t;

  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
  } state_t;

  typedef enum logic [1:0] {
    ROUND_F = 2'd0,
    ROUND_G = 2'd1,
    ROUND_H = 2'd2,
    ROUND_I = 2'd3
  } round_t;

  localparam state_t MD5_IV = '{
    a: 32'h67452301,
    b: 32'hefcdab89,
    c: 32'h98badcfe,
    d: 32'h10325476
  };

  localparam int unsigned STEPS = 64;
  localparam int unsigned BLOCK_WORDS = 16;

endpackage
