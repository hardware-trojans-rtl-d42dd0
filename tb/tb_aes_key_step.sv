// tb_aes_key_step: chains the ten key-schedule stages and compares every
// round key with the reference expansion, for the FIPS-197 key (last round
// key d014f9a8c9ee2589e13f0cc8b6630ca6) and random keys.
module tb_aes_key_step;
  import tb_aes_ref_pkg::*;
  logic [127:0] k [0:10];
  int checks = 0, failures = 0;

  for (genvar r = 1; r <= 10; r++) begin : g_ks
    aes_key_step #(.ROUND(r)) dut (.key_in(k[r-1]), .key_out(k[r]));
  end

  task automatic run(logic [127:0] key);
    logic [127:0] rk [11];
    k[0] = key; #1;
    expand(key, rk);
    for (int r = 1; r <= 10; r++) begin
      checks++;
      if (k[r] !== rk[r]) begin
        failures++;
        $display("FAIL round key %0d: got %032h expected %032h", r, k[r], rk[r]);
      end
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
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (k[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL FIPS last round key %032h", k[10]);
    end
    for (int i = 0; i < 50; i++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
