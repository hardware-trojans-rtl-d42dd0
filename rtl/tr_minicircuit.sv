// tr_minicircuit: one untrusted mini-circuit Gamma_i^j of the Trojan-
// resilient framework, carrying the arrival-time-modulation Trojan.
//
// Correlated randomness: the mini-circuit keeps two 128-bit PRNG words
// (ra for the state mask, rb for the key mask) and shows them to the
// master, which relays to it the words of its right-hand neighbour
// (j+1 mod 3). It forms alpha_j = ra_j ^ ra_(j+1) and beta_j = rb_j ^
// rb_(j+1), so that alpha_1 ^ alpha_2 ^ alpha_3 = 0 and likewise for beta,
// and sends them to the master, which returns the masked inputs.
// Sharing: on the clock where m2s.start (FSM_RST) is high it latches its
// state share (alpha_j, x_(j-1)) and key share (beta_j, y_(j-1)) and steps
// both PRNGs. Processing, one clock later: in AES mode it applies the 3-party
// key addition, res = (alpha_j ^ beta_j, x_(j-1) ^ y_(j-1)), the last
// AddRoundKey of the protected cipher; in MOE mode (the last key addition is
// done by the master) it returns its state share unchanged. s2m.done is high
// for one clock with the result, two clocks after the start edge.
//
// Trojan (TROJAN=1): mod_level_detect and mod_seq_detect watch m2s.start.
// While f_trig is high the payload multiplexer drives the state share to
// zero: in AES mode the result becomes the key share (beta_j, y_(j-1)), so
// the master reconstructs the key; in MOE mode the result is (0, 0) and
// the master's key addition outputs the key. TROJAN=0 gives the honest
// mini-circuit.
//
// The protocol steps, share layout, trigger and payload follow the
// framework and Trojan being modelled. The way the correlated randoms are
// produced (neighbour relay) and the PRNG (a full-width 128-bit xorshift:
// s ^= s<<23, s ^= s>>17, s ^= s<<26, not cryptographic) are this design's
// choices; the shared AES rounds before the final key addition are not
// modelled, so the state entering the key addition is the shared plaintext.
// The detectors' observation outputs (overflow flag, counter, shift
// register) are left unconnected here: only m_t and f_trig are used, and
// lint reports the three as unused signals.
module tr_minicircuit
  import tr_pkg::*;
#(
  parameter bit              TROJAN = 1'b1,
  parameter bit              MOE    = 1'b0,
  parameter word_t           SEED_A = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210,
  parameter word_t           SEED_B = 128'h0f1e_2d3c_4b5a_6978_8796_a5b4_c3d2_e1f0,
  parameter int              CNT_W  = CNT_W_DEF,
  parameter int unsigned     THRESH = THRESH_DEF,
  parameter int              SEQ_W  = SEQ_W_DEF,
  parameter logic [SEQ_W-1:0] SEQ   = SEQ_W'(SEQ_DEF)
) (
  input  logic clk,
  input  logic rst_n,
  output rnd_t  rnd,      // own PRNG words, to the master
  input  rnd_t  rnd_nb,   // right-hand neighbour's PRNG words, relayed
  output corr_t corr,     // alpha_j, beta_j
  input  m2s_t  m2s,
  output s2m_t  s2m,
  output logic f_trig
);

  function automatic word_t prng_next(word_t s);
    word_t t;
    t = s ^ (s << 23);
    t = t ^ (t >> 17);
    t = t ^ (t << 26);
    return t;
  endfunction

  word_t  ra_q, rb_q;
  share_t vsh_q, ksh_q;
  logic   pend_q;
  share_t res_q;
  logic   done_q;
  share_t vsh_eff;

  // Correlated randomness and masks sent to the master.
  assign rnd.ra     = ra_q;
  assign rnd.rb     = rb_q;
  assign corr.alpha = ra_q ^ rnd_nb.ra;
  assign corr.beta  = rb_q ^ rnd_nb.rb;
  assign s2m.done  = done_q;
  assign s2m.res   = res_q;

  // Trojan trigger.
  if (TROJAN) begin : g_trojan
    logic             m_t;
    logic             f_ovfl;
    logic [CNT_W-1:0] cnt;
    logic [SEQ_W-1:0] sr;
    mod_level_detect #(.CNT_W(CNT_W), .THRESH(THRESH)) u_level (
      .clk, .rst_n, .fsm_rst(m2s.start), .m_t, .f_ovfl, .cnt
    );
    mod_seq_detect #(.SEQ_W(SEQ_W), .SEQ(SEQ)) u_seq (
      .clk, .rst_n, .fsm_rst(m2s.start), .m_t, .f_trig, .sr
    );
  end else begin : g_honest
    assign f_trig = 1'b0;
  end

  // Payload multiplexer: state share forced to zero while triggered.
  assign vsh_eff = f_trig ? '0 : vsh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_q   <= SEED_A;
      rb_q   <= SEED_B;
      vsh_q  <= '0;
      ksh_q  <= '0;
      pend_q <= 1'b0;
      res_q  <= '0;
      done_q <= 1'b0;
    end else begin
      pend_q <= m2s.start;
      done_q <= pend_q;
      if (m2s.start) begin
        vsh_q <= '{s0: corr.alpha, s1: m2s.x};
        ksh_q <= '{s0: corr.beta, s1: m2s.y};
        ra_q  <= prng_next(ra_q);
        rb_q  <= prng_next(rb_q);
      end
      if (pend_q) begin
        if (MOE) res_q <= vsh_eff;
        else     res_q <= '{s0: vsh_eff.s0 ^ ksh_q.s0, s1: vsh_eff.s1 ^ ksh_q.s1};
      end
    end
  end

endmodule
