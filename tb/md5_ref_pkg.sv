// md5_ref_pkg: software reference model of MD5 for the testbenches.
//
// Written as ordinary procedural code, apart from the RTL: the additive
// constants are computed from the sine function, T[i] = floor(|sin(i+1)|*2^32),
// the message word order and rotations come from small tables here, the
// padding works on a byte-oriented bit string, and the state update is a
// loop with a temporary. ref_digest returns the result in the same order as
// the hardware output, {D, C, B, A}. hex_to_out converts a digest written the
// usual way (hex of bytes 0..15) into that order.
package md5_ref_pkg;

  typedef logic [31:0] w32_t;

  function automatic w32_t ref_t(int i);
    real v;
    v = $sin(real'(i + 1));
    if (v < 0.0) v = -v;
    return w32_t'(longint'($floor(v * 4294967296.0)));
  endfunction

  function automatic int ref_k(int i);
    int tab [64] = '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,
                     1,6,11,0,5,10,15,4,9,14,3,8,13,2,7,12,
                     5,8,11,14,1,4,7,10,13,0,3,6,9,12,15,2,
                     0,7,14,5,12,3,10,1,8,15,6,13,4,11,2,9};
    return tab[i];
  endfunction

  function automatic int ref_s(int i);
    int r0 [4] = '{7, 12, 17, 22};
    int r1 [4] = '{5, 9, 14, 20};
    int r2 [4] = '{4, 11, 16, 23};
    int r3 [4] = '{6, 10, 15, 21};
    case (i / 16)
      0: return r0[i % 4];
      1: return r1[i % 4];
      2: return r2[i % 4];
      default: return r3[i % 4];
    endcase
  endfunction

  function automatic w32_t ref_f(int rnd, w32_t b, w32_t c, w32_t d);
    w32_t r;
    for (int n = 0; n < 32; n++) begin
      case (rnd)
        0: r[n] = b[n] ? c[n] : d[n];
        1: r[n] = d[n] ? b[n] : c[n];
        2: r[n] = (b[n] + c[n] + d[n]) % 2 == 1;
        default: r[n] = c[n] != (b[n] || !d[n]);
      endcase
    end
    return r;
  endfunction

  function automatic w32_t rotl(w32_t v, int s);
    w32_t r = v;
    repeat (s) r = {r[30:0], r[31]};
    return r;
  endfunction

  // One step on {a,b,c,d}; returns the new {a,b,c,d}.
  function automatic logic [127:0] ref_step(int i, logic [127:0] st, w32_t x [16]);
    w32_t a, b, c, d, tmp;
    {a, b, c, d} = st;
    tmp = a + ref_f(i / 16, b, c, d) + x[ref_k(i)] + ref_t(i);
    tmp = b + rotl(tmp, ref_s(i));
    a = d; d = c; c = b; b = tmp;
    return {a, b, c, d};
  endfunction

  function automatic logic [127:0] ref_compress(logic [127:0] h, w32_t x [16]);
    logic [127:0] st = h;
    for (int i = 0; i < 64; i++) st = ref_step(i, st, x);
    return {st[127:96] + h[127:96], st[95:64] + h[95:64],
            st[63:32] + h[63:32], st[31:0] + h[31:0]};
  endfunction

  // Frame of nblk*512 bits for a message of len bits, given as an integer
  // whose most significant of the len bits is the first bit of the string.
  function automatic void ref_pad(logic [511:0] msg, int len, int nblk, ref w32_t x [32]);
    byte unsigned by [];
    by = new[nblk * 64];
    foreach (by[n]) by[n] = 0;
    for (int p = 0; p < len; p++)
      if (msg[len - 1 - p]) by[p / 8] |= byte'(8'h80 >> (p % 8));
    by[len / 8] |= byte'(8'h80 >> (len % 8));
    for (int n = 0; n < 8; n++)
      by[nblk * 64 - 8 + n] = byte'((64'(len) >> (8 * n)) & 64'hff);
    foreach (x[w]) x[w] = '0;
    for (int w = 0; w < nblk * 16; w++)
      x[w] = {by[4*w+3], by[4*w+2], by[4*w+1], by[4*w]};
  endfunction

  function automatic logic [127:0] ref_digest(logic [511:0] msg, int len, int nblk);
    w32_t x [32];
    w32_t xb [16];
    logic [127:0] h = 128'h67452301_efcdab89_98badcfe_10325476;
    ref_pad(msg, len, nblk, x);
    for (int j = 0; j < nblk; j++) begin
      for (int w = 0; w < 16; w++) xb[w] = x[16*j + w];
      h = ref_compress(h, xb);
    end
    // h = {A,B,C,D}; output order {D,C,B,A}
    return {h[31:0], h[63:32], h[95:64], h[127:96]};
  endfunction

  // "0cc175b9..." (bytes 0..15) -> {D,C,B,A}
  function automatic logic [127:0] hex_to_out(logic [127:0] hex);
    logic [127:0] r;
    for (int n = 0; n < 16; n++) r[8*n +: 8] = hex[127 - 8*n -: 8];
    return r;
  endfunction

endpackage
