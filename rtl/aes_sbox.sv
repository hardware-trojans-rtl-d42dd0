// aes_sbox: the Rijndael SubBytes substitution for one byte.
//
// The 256-entry table is not stored as data: it is computed at elaboration
// from its definition (inverse in GF(2^8), 00 mapped to itself, then the
// affine map y_i = v_i ^ v_(i+4) ^ v_(i+5) ^ v_(i+6) ^ v_(i+7) ^ c_i with
// c = 0x63), and the module is a plain combinational lookup, which synthesis
// turns into LUTs the way an FPGA round would implement it. No clock, no
// latency.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  function automatic logic [255:0][7:0] build_table();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = build_table();

  assign out_byte = SBOX[in_byte];

endmodule
