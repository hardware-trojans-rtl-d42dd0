// tb_aes_round: checks a middle round and a final round against the
// reference round function on random states and keys, and the first round
// of the FIPS-197 example (state after round 1 = a49c7ff2689f352b6b5bea43026a5049
// for key 2b7e1516... and plaintext 3243f6a8...).
module tb_aes_round;
  import tb_aes_ref_pkg::*;
  logic [127:0] s_in, k, s_mid, s_fin;
  int checks = 0, failures = 0;

  aes_round #(.FINAL(1'b0)) dut_mid (.state_in(s_in), .round_key(k), .state_out(s_mid));
  aes_round #(.FINAL(1'b1)) dut_fin (.state_in(s_in), .round_key(k), .state_out(s_fin));

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rk [11];
    ref_init();
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c, rk);
    s_in = 128'h3243f6a8885a308d313198a2e0370734 ^ rk[0];
    k = rk[1];
    #1;
    chk("FIPS round 1", s_mid, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 200; i++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      k    = {$urandom, $urandom, $urandom, $urandom};
      #1;
      chk("middle round", s_mid, from_bytes(round_fn(to_bytes(s_in), k, 0)));
      chk("final round",  s_fin, from_bytes(round_fn(to_bytes(s_in), k, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
