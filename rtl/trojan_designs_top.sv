// trojan_designs_top: the two Trojan-attacked block-cipher designs side by
// side, each with its own ports.
//
// Left: the unprotected round-pipelined AES-128 (aes_round_pipe) whose
// round-7 byte S(0,3) paths were slowed by a parametric Trojan. The
// timing_fault_model, a behavioural stand-in for those slowed paths, turns
// the declared operating frequency f_clk_mhz into the error byte that
// register D8 captures: none below 65 MHz, a random byte above 80 MHz.
// Ciphertext follows the plaintext by ten clocks, one block per clock.
//
// Right: the protected cipher of the Trojan-resilient framework
// (tr_system): a trusted master and LAMBDA sets of three mini-circuits
// built with the arrival-time-modulation Trojan. After the secret sequence
// of slow/fast plaintext arrival gaps the mini-circuits zero the state
// share before the final key addition and the master outputs the key. The
// result follows the plaintext by three clocks.
//
// Because the top holds the behavioural fault model it is a simulation
// top; the AES core and tr_system on their own are synthesizable.
module trojan_designs_top
  import aes_pkg::*;
  import tr_pkg::*;
#(
  parameter int                LAMBDA      = 3,
  parameter bit                MOE         = 1'b0,
  parameter int unsigned       TROJAN_MASK = 32'hffff_ffff,
  parameter int                CNT_W       = CNT_W_DEF,
  parameter int unsigned       THRESH      = THRESH_DEF,
  parameter int                SEQ_W       = SEQ_W_DEF,
  parameter logic [SEQ_W-1:0]  SEQ         = SEQ_W'(SEQ_DEF),
  parameter int unsigned       F_TRIG_MHZ  = 65,
  parameter int unsigned       F_FULL_MHZ  = 80
) (
  input  logic        clk,
  input  logic        rst_n,
  // Round-pipelined AES-128
  input  logic        aes_in_valid,
  input  state_t      aes_plaintext,
  input  state_t      aes_key,
  input  logic [31:0] f_clk_mhz,
  output logic        aes_out_valid,
  output state_t      aes_ciphertext,
  output byte_t       aes_fault,
  // Protected cipher with the side-channel-triggered Trojan
  input  logic        tr_pt_valid,
  input  word_t       tr_plaintext,
  input  word_t       tr_key,
  output logic        tr_out_valid,
  output word_t       tr_out,
  output logic        tr_error,
  output logic        tr_sub_mismatch [LAMBDA],
  output logic        tr_f_trig [LAMBDA][3]
);

  timing_fault_model #(.F_TRIG_MHZ(F_TRIG_MHZ), .F_FULL_MHZ(F_FULL_MHZ)) u_fault (
    .clk, .f_clk_mhz, .err(aes_fault)
  );

  aes_round_pipe u_aes (
    .clk, .rst_n,
    .in_valid  (aes_in_valid),
    .plaintext (aes_plaintext),
    .key       (aes_key),
    .d8_fault  (aes_fault),
    .out_valid (aes_out_valid),
    .ciphertext(aes_ciphertext)
  );

  tr_system #(
    .LAMBDA(LAMBDA), .MOE(MOE), .TROJAN_MASK(TROJAN_MASK),
    .CNT_W(CNT_W), .THRESH(THRESH), .SEQ_W(SEQ_W), .SEQ(SEQ)
  ) u_tr (
    .clk, .rst_n,
    .pt_valid    (tr_pt_valid),
    .plaintext   (tr_plaintext),
    .key         (tr_key),
    .out_valid   (tr_out_valid),
    .out         (tr_out),
    .error       (tr_error),
    .sub_mismatch(tr_sub_mismatch),
    .f_trig      (tr_f_trig)
  );

endmodule
