// tb_aes_ref_pkg: byte-array reference model of AES-128 encryption for the
// testbenches, written independently of the RTL: the S-box is found by
// searching for the multiplicative inverse, MixColumns uses a generic
// GF(2^8) multiplier, and the key is expanded word by word as in the AES
// standard. ref_encrypt can inject an XOR error into byte S(0,3) (bits
// [31:24]) of the state leaving round 7, the place the timing fault of the
// pipelined core lands.
package tb_aes_ref_pkg;

  typedef logic [7:0] b16_t [16];

  function automatic logic [7:0] rmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = 0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rsbox(logic [7:0] x);
    logic [7:0] inv = 0;
    logic [7:0] y;
    for (int c = 1; c < 256; c++) if (rmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  logic [7:0] SB [256];
  bit ready = 0;

  function automatic void ref_init();
    if (!ready) begin
      for (int i = 0; i < 256; i++) SB[i] = rsbox(8'(i));
      ready = 1;
    end
  endfunction

  function automatic b16_t to_bytes(logic [127:0] v);
    b16_t b;
    for (int n = 0; n < 16; n++) b[n] = v[127-8*n -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(b16_t b);
    logic [127:0] v;
    for (int n = 0; n < 16; n++) v[127-8*n -: 8] = b[n];
    return v;
  endfunction

  // Round keys 0..10 as 128-bit words.
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    ref_init();
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]};
        t[31:24] ^= rc;
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic b16_t round_fn(b16_t s, logic [127:0] k, bit final_round);
    b16_t t, u;
    b16_t kb;
    kb = to_bytes(k);
    for (int n = 0; n < 16; n++) t[n] = SB[s[n]];
    for (int c = 0; c < 4; c++)                       // ShiftRows
      for (int r = 0; r < 4; r++) u[4*c+r] = t[4*((c+r)%4)+r];
    if (!final_round)
      for (int c = 0; c < 4; c++) begin               // MixColumns
        logic [7:0] a0, a1, a2, a3;
        a0 = u[4*c]; a1 = u[4*c+1]; a2 = u[4*c+2]; a3 = u[4*c+3];
        u[4*c]   = rmul(a0,2) ^ rmul(a1,3) ^ a2 ^ a3;
        u[4*c+1] = a0 ^ rmul(a1,2) ^ rmul(a2,3) ^ a3;
        u[4*c+2] = a0 ^ a1 ^ rmul(a2,2) ^ rmul(a3,3);
        u[4*c+3] = rmul(a0,3) ^ a1 ^ a2 ^ rmul(a3,2);
      end
    for (int n = 0; n < 16; n++) u[n] ^= kb[n];
    return u;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key,
                                               logic [7:0] r7_err = 8'h00);
    logic [127:0] rk [11];
    b16_t s;
    expand(key, rk);
    s = to_bytes(pt ^ rk[0]);
    for (int r = 1; r <= 9; r++) begin
      s = round_fn(s, rk[r], 0);
      if (r == 7) s[12] ^= r7_err;     // byte 12 = S(0,3) = bits [31:24]
    end
    s = round_fn(s, rk[10], 1);
    return from_bytes(s);
  endfunction

endpackage
