// aes_key_step: one stage KSr of the AES-128 key schedule.
//
// From round key r-1 (four 32-bit words w0..w3, w0 in the top bits) it forms
// round key r: w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon(r), then each following
// word is the previous new word XORed with the old one. Four aes_sbox lookups,
// combinational. ROUND selects the round constant. The schedule itself is
// the standard AES-128 one; the design only places one such stage in front of
// each pipeline register so that every block carries its own key.
module aes_key_step
  import aes_pkg::*;
#(
  parameter int ROUND = 1   // 1..10
) (
  input  state_t key_in,
  output state_t key_out
);

  logic [31:0] w0, w1, w2, w3;
  logic [31:0] rot, sub;
  logic [31:0] n0, n1, n2, n3;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sub
    aes_sbox u_sbox (.in_byte(rot[31-8*b -: 8]), .out_byte(sub[31-8*b -: 8]));
  end

  assign n0 = w0 ^ sub ^ {rcon(ROUND), 24'h0};
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign n3 = w3 ^ n2;
  assign key_out = {n0, n1, n2, n3};

endmodule
