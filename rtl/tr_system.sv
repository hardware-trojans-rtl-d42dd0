// tr_system: the protected cipher of the Trojan-resilient framework, one
// trusted master and LAMBDA sets of three untrusted mini-circuits, each set
// emulating the cipher with a 3-party protocol.
//
// The mini-circuits talk only to the master. TROJAN_MASK bit i (up to 32
// sets) says whether set i was built with the arrival-time Trojan (by default all sets are, as
// when one manufacturer makes every set). Each mini-circuit gets its own PRNG
// seeds, derived from its position by a fixed mixing constant. Interface and
// timing are those of tr_master: plaintext and key with pt_valid, result
// three clocks later with out_valid and error. f_trig shows each
// mini-circuit's trigger flag. The default LAMBDA of 3 is this design's
// choice; the framework leaves the number of sets open.
module tr_system
  import tr_pkg::*;
#(
  parameter int              LAMBDA      = 3,
  parameter bit              MOE         = 1'b0,
  parameter int unsigned       TROJAN_MASK = 32'hffff_ffff,
  parameter int              CNT_W       = CNT_W_DEF,
  parameter int unsigned     THRESH      = THRESH_DEF,
  parameter int              SEQ_W       = SEQ_W_DEF,
  parameter logic [SEQ_W-1:0] SEQ        = SEQ_W'(SEQ_DEF)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pt_valid,
  input  word_t plaintext,
  input  word_t key,
  output logic  out_valid,
  output word_t out,
  output logic  error,
  output logic  sub_mismatch [LAMBDA],
  output logic  f_trig [LAMBDA][3]
);

  rnd_t  rnd    [LAMBDA][3];
  rnd_t  rnd_nb [LAMBDA][3];
  corr_t corr   [LAMBDA][3];
  m2s_t  m2s    [LAMBDA][3];
  s2m_t  s2m    [LAMBDA][3];

  tr_master #(.LAMBDA(LAMBDA), .MOE(MOE)) u_master (
    .clk, .rst_n, .pt_valid, .plaintext, .key,
    .out_valid, .out, .error, .sub_mismatch, .rnd, .rnd_nb, .corr, .m2s, .s2m
  );

  for (genvar i = 0; i < LAMBDA; i++) begin : g_set
    for (genvar j = 0; j < 3; j++) begin : g_mini
      localparam bit    INF = TROJAN_MASK[i];
      localparam word_t MIX = 128'h9e37_79b9_7f4a_7c15_f39c_c060_5ced_c834;
      localparam word_t SA  = MIX ^ (word_t'(3*i + j + 1) * 128'h1000_0000_0000_0001_0000_0001_0001_0001);
      localparam word_t SB  = ~MIX ^ (word_t'(3*i + j + 1) * 128'h0100_0001_0000_0100_0000_0001_0101_0011);
      tr_minicircuit #(
        .TROJAN(INF), .MOE(MOE), .SEED_A(SA), .SEED_B(SB),
        .CNT_W(CNT_W), .THRESH(THRESH), .SEQ_W(SEQ_W), .SEQ(SEQ)
      ) u_mini (
        .clk, .rst_n, .rnd(rnd[i][j]), .rnd_nb(rnd_nb[i][j]), .corr(corr[i][j]),
        .m2s(m2s[i][j]), .s2m(s2m[i][j]), .f_trig(f_trig[i][j])
      );
    end
  end

endmodule
