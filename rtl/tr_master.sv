// tr_master: trusted master circuit of the Trojan-resilient framework.
//
// It is the only path between the user and the LAMBDA sets of three
// mini-circuits, and the only path between the mini-circuits of a set.
// For each set i it relays the PRNG words of mini-circuit j+1 to mini-
// circuit j, receives the correlated randoms alpha_j (plaintext) and beta_j
// (key), masks the inputs, x_j = v ^ alpha_j and y_j = k ^ beta_j, and
// sends x_(j-1), y_(j-1) to mini-circuit j, so that no mini-circuit sees
// both halves of a secret. The plaintext's arrival (pt_valid) is passed on
// as start, the FSM_RST of the mini-circuits, on the same clock. When the
// sets return their processed shares it reconstructs each set's result
// (share_reconstruct), votes over the sets whose reconstruction agreed
// (majority_vote) and, in MOE mode, applies the final key addition itself.
//
// Timing: plaintext and key are taken with pt_valid at edge t; the shares
// come back after edge t+1; out/out_valid are registered at edge t+2, so
// the result appears three clocks after the input, one block per clock.
// error is set with out_valid when no result has a strict majority;
// sub_mismatch shows which sets failed their reconstruction check.
// The protocol (masking, share routing, reconstruction, vote, MOE key
// addition in the master) follows the framework being modelled; the
// single-clock handshake and the latency are this design's choices.
module tr_master
  import tr_pkg::*;
#(
  parameter int LAMBDA = 3,
  parameter bit MOE    = 1'b0
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
  input  rnd_t  rnd    [LAMBDA][3],
  output rnd_t  rnd_nb [LAMBDA][3],
  input  corr_t corr   [LAMBDA][3],
  output m2s_t  m2s    [LAMBDA][3],
  input  s2m_t  s2m    [LAMBDA][3]
);

  word_t  key_q1, key_q2;
  word_t  rec      [LAMBDA];
  logic   mis      [LAMBDA];
  logic   ok       [LAMBDA];
  word_t  voted;
  logic   found;
  logic   done;

  // Input sharing and relaying of randomness.
  for (genvar i = 0; i < LAMBDA; i++) begin : g_set
    share_t sh [3];
    for (genvar j = 0; j < 3; j++) begin : g_mini
      assign m2s[i][j].start = pt_valid;
      assign rnd_nb[i][j]    = rnd[i][(j+1)%3];
      assign m2s[i][j].x     = plaintext ^ corr[i][(j+2)%3].alpha;
      assign m2s[i][j].y     = key       ^ corr[i][(j+2)%3].beta;
      assign sh[j]           = s2m[i][j].res;
    end
    share_reconstruct u_rec (.sh(sh), .out(rec[i]), .mismatch(mis[i]));
    assign ok[i] = !mis[i];
  end

  majority_vote #(.LAMBDA(LAMBDA), .W(W)) u_vote (
    .vals(rec), .ok(ok), .out(voted), .found(found)
  );

  assign done = s2m[0][0].done;

  always_ff @(posedge clk) begin
    key_q1 <= key;
    key_q2 <= key_q1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      error     <= 1'b0;
      for (int i = 0; i < LAMBDA; i++) sub_mismatch[i] <= 1'b0;
    end else begin
      out_valid <= done;
      if (done) begin
        out   <= MOE ? (voted ^ key_q2) : voted;
        error <= !found;
        for (int i = 0; i < LAMBDA; i++) sub_mismatch[i] <= mis[i];
      end
      // All mini-circuits run in lockstep: they must answer on the same
      // clock. Checked out of reset only.
      for (int i = 0; i < LAMBDA; i++)
        for (int j = 0; j < 3; j++)
          a_lockstep: assert (s2m[i][j].done == done)
            else $error("mini-circuit %0d.%0d answered out of step", i, j);
    end
  end

endmodule
