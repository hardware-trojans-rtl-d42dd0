// tb_trojan_designs_top_full: the top at its default sizes (25-bit interval
// counter, 33,000,000-cycle threshold, 80-bit trigger sequence, three sets).
// One complete operation on each side: the FIPS-197 AES-128 vector through
// the pipeline at 50 MHz (ciphertext 69c4e0d86a7b0430d8cdb78070b4c55a ten
// clocks later) and at 100 MHz (faulty ciphertext equal to the reference
// with the captured error byte), and two protected encryptions with
// arrivals close together, each returning plaintext ^ key three clocks
// later with no trigger.
module tb_trojan_designs_top_full;
  import tb_aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic aes_in_valid = 0, aes_out_valid;
  logic [127:0] aes_plaintext = 0, aes_key = 0, aes_ciphertext;
  logic [31:0] f_clk_mhz = 50;
  logic [7:0] aes_fault;
  logic tr_pt_valid = 0, tr_out_valid, tr_error;
  logic [127:0] tr_plaintext = 0, tr_key = 0, tr_out;
  logic tr_sub_mismatch [3];
  logic tr_f_trig [3][3];
  int checks = 0, failures = 0;

  trojan_designs_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic aes_block(int f, logic [127:0] p, logic [127:0] k, logic [127:0] exp);
    logic [7:0] e;
    f_clk_mhz = f;
    @(negedge clk);
    aes_in_valid = 1; aes_plaintext = p; aes_key = k;
    @(negedge clk);
    aes_in_valid = 0;
    repeat (6) @(negedge clk);
    e = aes_fault;
    repeat (3) @(negedge clk);
    chk(aes_out_valid, "AES output not ten clocks after input");
    if (f < 65) chk(aes_ciphertext == exp, "AES ciphertext");
    else        chk(aes_ciphertext == ref_encrypt(p, k, e), "faulty AES ciphertext");
  endtask

  task automatic protected_block();
    logic [127:0] v, k;
    v = {$urandom, $urandom, $urandom, $urandom};
    k = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    tr_pt_valid = 1; tr_plaintext = v; tr_key = k;
    @(negedge clk); tr_pt_valid = 0;
    @(negedge clk);
    @(negedge clk);
    chk(tr_out_valid && !tr_error, "protected output missing or in error");
    chk(tr_out == (v ^ k), "protected output");
    chk(!tr_f_trig[0][0], "unexpected trigger");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    aes_block(50, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
              128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    aes_block(100, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0);
    protected_block();
    protected_block();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
