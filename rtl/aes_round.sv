// aes_round: one AES round of the round-level pipeline (R1..R9, or RF when
// FINAL is set).
//
// Combinational: SubBytes on all sixteen bytes (sixteen aes_sbox lookups),
// ShiftRows (wiring only), MixColumns (skipped in the final round) and
// AddRoundKey with the round key that travels in the same pipeline register
// as the state. The order SB, SR, MC, AK is the AES round; no register is
// inside, the pipeline registers sit around this block.
module aes_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0   // 1: final round without MixColumns
) (
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  state_t sb;
  state_t sr;
  state_t mc;

  for (genvar n = 0; n < 16; n++) begin : g_sb
    aes_sbox u_sbox (.in_byte(state_in[127-8*n -: 8]), .out_byte(sb[127-8*n -: 8]));
  end

  assign sr = shift_rows(sb);
  assign mc = FINAL ? sr : mix_columns(sr);
  assign state_out = mc ^ round_key;

endmodule
