// tb_aes_round_pipe: streams blocks through the pipelined AES-128 core.
// Checks: the two FIPS-197 vectors; 60 random plaintext/key pairs entered
// back to back (one per clock, each with its own key) with every ciphertext
// compared with the reference model; the latency of exactly ten clocks from
// in_valid to out_valid; a gap in the input stream; and, with d8_fault
// driven, that the faulty ciphertext equals the reference encryption with
// the same error XORed into byte S(0,3) after round 7.
module tb_aes_round_pipe;
  import tb_aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [127:0] plaintext = 0, key = 0, ciphertext;
  logic [7:0] d8_fault = 0;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes_round_pipe dut (.clk, .rst_n, .in_valid, .plaintext, .key, .d8_fault,
                      .out_valid, .ciphertext);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results, in issue order.
  logic [127:0] exp_q [$];
  int           t_q   [$];
  int           seen = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2; $display("FAIL unexpected output");
      end else begin
        logic [127:0] e; int t0;
        e = exp_q.pop_front(); t0 = t_q.pop_front();
        if (ciphertext !== e) begin
          failures++; $display("FAIL ct %032h expected %032h", ciphertext, e);
        end
        if (cycle - t0 != 10) begin
          failures++; $display("FAIL latency %0d", cycle - t0);
        end
      end
      seen++;
    end
  end

  task automatic issue(logic [127:0] p, logic [127:0] k, logic [7:0] f = 0);
    @(negedge clk);
    in_valid = 1; plaintext = p; key = k;
    exp_q.push_back(ref_encrypt(p, k, f));
    t_q.push_back(cycle);
    @(negedge clk);
    in_valid = 0;
    if (f != 0) begin
      // D7 holds the block from the sixth edge after capture into D1 on;
      // D8 captures the round-7 result on the seventh.
      repeat (6) @(negedge clk);
      d8_fault = f;
      @(negedge clk);
      d8_fault = 0;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    issue(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    issue(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks += 2;
    if (ref_encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL ref vector 1"); end
    if (ref_encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c)
        !== 128'h3925841d02dc09fbdc118597196a0b32) begin failures++; $display("FAIL ref vector 2"); end
    // Back-to-back stream.
    @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      logic [127:0] p, k;
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      in_valid = 1; plaintext = p; key = k;
      exp_q.push_back(ref_encrypt(p, k));
      t_q.push_back(cycle);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (15) @(negedge clk);
    // Faults injected at the round-7 output byte.
    for (int i = 0; i < 8; i++)
      issue({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
            8'(1 + ($urandom % 255)));
    repeat (15) @(negedge clk);
    checks++;
    if (seen != 70 || exp_q.size() != 0) begin
      failures++; $display("FAIL saw %0d outputs, %0d pending", seen, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
