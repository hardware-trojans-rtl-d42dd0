// aes_pkg: types and GF(2^8) helpers shared by the AES-128 datapath.
//
// The 128-bit state uses the usual AES byte order: byte n of the state
// (n = 4*column + row) sits in bits [127-8n -: 8], so the first byte on the
// wire is S(0,0) and bits [31:24] hold S(0,3), the byte that the timing
// fault of the round-pipelined design lands on. The functions below are pure
// combinational logic: ShiftRows (row i rotated left by i bytes), MixColumns
// (multiplication by 03x^3+01x^2+01x+02 mod x^4+1), GF(2^8) multiplication
// with the AES polynomial x^8+x^4+x^3+x+1, and the S-box computed as the
// multiplicative inverse followed by the affine map. The operations follow
// the AES definitions; the affine constant 0x63 and the reduction polynomial
// come from the AES standard.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [7:0]   byte_t;

  // Byte n (n = 4*col + row) of a state.
  function automatic byte_t get_byte(state_t s, int n);
    return s[127-8*n -: 8];
  endfunction

  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p;
    byte_t aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // x^254 = x^-1 in GF(2^8); 0 maps to 0.
  function automatic byte_t gf_inv(byte_t x);
    byte_t sq;
    byte_t acc;
    sq  = x;
    acc = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq  = gf_mul(sq, sq);     // x^(2^i)
      acc = gf_mul(acc, sq);    // product of x^2 .. x^128
    end
    return acc;
  endfunction

  function automatic byte_t sbox_calc(byte_t x);
    byte_t v;
    byte_t y;
    v = gf_inv(x);
    for (int i = 0; i < 8; i++)
      y[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic state_t shift_rows(state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  function automatic logic [31:0] mix_column(logic [31:0] col);
    byte_t a0, a1, a2, a3;
    a0 = col[31:24]; a1 = col[23:16]; a2 = col[15:8]; a3 = col[7:0];
    return {xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3),
            (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic state_t mix_columns(state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      o[127-32*c -: 32] = mix_column(s[127-32*c -: 32]);
    return o;
  endfunction

  // Round constant of key-schedule step r (1..10).
  function automatic byte_t rcon(int r);
    byte_t v;
    v = 8'h01;
    for (int i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

endpackage
