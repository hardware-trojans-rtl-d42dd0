// aes_round_pipe: round-level pipelined AES-128 encryption core.
//
// The initial AddRoundKey (AK0) and the first key-schedule stage (KS1) feed
// pipeline register D1; round Rr sits between registers Dr and D(r+1), and
// stage KS(r+1) computes the next round key from the key held in Dr. Every
// register stage holds a state, its round key and a valid bit, so a new
// block with its own key may enter on every clock. The final round RF
// (no MixColumns) is combinational after D10 and drives the ciphertext.
//
// Timing: a block presented with in_valid at clock edge t appears on
// ciphertext with out_valid after edge t+10 (ten register stages), one
// block per clock.
//
// d8_fault is the observation point of the timing-violation Trojan: it is
// XORed into bits [31:24] (state byte S(0,3)) of the round-7 result just
// before register D8 captures it. In a chip that meets timing it is zero;
// the timing_fault_model drives it with the random byte that the slowed
// round-7 paths capture when the clock is too fast. The pipeline layout and
// the byte position follow the design being modelled; the fault is
// represented as an XOR mask, which is this model's choice.
module aes_round_pipe
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  state_t plaintext,
  input  state_t key,
  input  byte_t  d8_fault,
  output logic   out_valid,
  output state_t ciphertext
);

  localparam int NREG = 10;

  // Pipeline registers D1..D10: valid bit, state and round key.
  logic   vld  [1:NREG];
  state_t st   [1:NREG];
  state_t rk   [1:NREG];
  state_t rout [1:NREG-1]; // round outputs R1..R9
  state_t kout [1:NREG];   // key-schedule outputs KS1..KS10

  aes_key_step #(.ROUND(1)) u_ks1 (.key_in(key), .key_out(kout[1]));

  for (genvar r = 1; r < NREG; r++) begin : g_rounds
    aes_round #(.FINAL(1'b0)) u_round (
      .state_in (st[r]),
      .round_key(rk[r]),
      .state_out(rout[r])
    );
    aes_key_step #(.ROUND(r+1)) u_ks (.key_in(rk[r]), .key_out(kout[r+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 1; r <= NREG; r++) vld[r] <= 1'b0;
    end else begin
      vld[1] <= in_valid;
      for (int r = 2; r <= NREG; r++) vld[r] <= vld[r-1];
    end
  end

  always_ff @(posedge clk) begin
    st[1] <= plaintext ^ key;          // AK0
    rk[1]  <= kout[1];
    for (int r = 2; r <= NREG; r++) begin
      st[r] <= rout[r-1];
      rk[r]  <= kout[r];
    end
    st[8][31:24] <= rout[7][31:24] ^ d8_fault;
  end

  aes_round #(.FINAL(1'b1)) u_rf (
    .state_in (st[NREG]),
    .round_key(rk[NREG]),
    .state_out(ciphertext)
  );

  assign out_valid = vld[NREG];

endmodule
