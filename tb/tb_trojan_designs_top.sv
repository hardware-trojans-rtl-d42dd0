// tb_trojan_designs_top: both designs end to end, with the trigger of the
// protected cipher reduced (6-bit counter, threshold 20, 8-bit sequence
// 10110101) so that it can be reached in simulation.
//
// AES side: blocks at 50 MHz must match the reference; blocks at 100 MHz
// must match the reference with the error byte the fault model produced on
// the clock where D8 captured the block XORed into S(0,3) after round 7;
// blocks at 72 MHz must match one of the two. Mechanisms counted: correct
// encryption, faulty encryption, fault-free clock while overclocked.
// Protected side: random arrival gaps, then the reset run and the trigger
// sequence twice. Mechanisms counted: fast level, slow level, counter
// overflow, mismatch reload, trigger, key leaked at the output. Each must
// occur at least once.
module tb_trojan_designs_top;
  import tb_aes_ref_pkg::*;
  localparam logic [7:0] SEQ = 8'b1011_0101;
  logic clk = 0, rst_n = 0;
  logic aes_in_valid = 0, aes_out_valid;
  logic [127:0] aes_plaintext = 0, aes_key = 0, aes_ciphertext;
  logic [31:0] f_clk_mhz = 50;
  logic [7:0] aes_fault;
  logic tr_pt_valid = 0, tr_out_valid, tr_error;
  logic [127:0] tr_plaintext = 0, tr_key = 0, tr_out;
  logic tr_sub_mismatch [3];
  logic tr_f_trig [3][3];
  int checks = 0, failures = 0, pos = 0;
  int n_aes_ok = 0, n_aes_fault = 0, n_aes_nofault_oc = 0;
  int n_fast = 0, n_slow = 0, n_ovfl = 0, n_reload = 0, n_trig = 0, n_leak = 0;

  trojan_designs_top #(.CNT_W(6), .THRESH(20), .SEQ_W(8), .SEQ(SEQ)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- AES side: one block, fault sampled when D8 captures it.
  task automatic aes_block(int f);
    logic [127:0] p, k, good, bad;
    logic [7:0] e;
    f_clk_mhz = f;
    p = {$urandom, $urandom, $urandom, $urandom};
    k = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    aes_in_valid = 1; aes_plaintext = p; aes_key = k;
    @(negedge clk);
    aes_in_valid = 0;
    repeat (6) @(negedge clk);
    e = aes_fault;                       // value D8 captures on the next edge
    repeat (3) @(negedge clk);
    chk(aes_out_valid, "AES output not ten clocks after input");
    good = ref_encrypt(p, k);
    bad  = ref_encrypt(p, k, e);
    if (f < 65) begin
      chk(aes_ciphertext == good, "AES ciphertext below trigger frequency");
      n_aes_ok++;
    end else begin
      chk(aes_ciphertext == bad, "AES ciphertext does not match the injected fault");
      if (e != 0) begin
        n_aes_fault++;
        chk(aes_ciphertext != good, "fault did not change the ciphertext");
      end else n_aes_nofault_oc++;
    end
    @(negedge clk);
  endtask

  // ---- Protected side: arrival after g idle clocks (the counter sees g+3).
  task automatic arrive(int g);
    int c;
    logic lvl;
    logic [127:0] v, k;
    repeat (g) @(negedge clk);
    c = g + 3;
    lvl = (c % 64 > 20) || c >= 64;
    if (c >= 64) n_ovfl++;
    if (lvl) n_slow++; else n_fast++;
    if (pos == 8) pos = 0;
    else if (lvl == SEQ[7-pos]) pos++;
    else begin
      if (pos != 0) n_reload++;
      pos = 0;
    end
    v = {$urandom, $urandom, $urandom, $urandom};
    k = {$urandom, $urandom, $urandom, $urandom};
    tr_pt_valid = 1; tr_plaintext = v; tr_key = k;
    @(negedge clk); tr_pt_valid = 0;
    @(negedge clk);
    @(negedge clk);
    chk(tr_out_valid && !tr_error, "protected output missing or in error");
    if (pos == 8) begin
      n_trig++;
      chk(tr_out == k, "trigger completed but key not output");
      if (tr_out == k) n_leak++;
    end else
      chk(tr_out == (v ^ k), "protected output wrong");
    chk(tr_f_trig[1][2] == (pos == 8), "f_trig");
  endtask

  // Arrivals at the level opposite to the expected bit until the register
  // has been reloaded (pos 0), then the eight sequence bits.
  task automatic send_seq();
    while (pos != 0) arrive(pos == 8 ? 2 : (SEQ[7-pos] ? 2 : 40));
    for (int i = 7; i >= 0; i--) arrive(SEQ[i] ? 25 + $urandom % 30 : $urandom % 12);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin
        for (int i = 0; i < 6; i++) aes_block(50);
        for (int i = 0; i < 12; i++) aes_block(100);
        for (int i = 0; i < 12; i++) aes_block(72);
        for (int i = 0; i < 4; i++) aes_block(40);
      end
      begin
        arrive(2);
        for (int i = 0; i < 20; i++) arrive($urandom % 90);
        send_seq();
        arrive(3);
        arrive(40); arrive(2); arrive(40);     // 1,0 then a mismatch: reload
        arrive(1); arrive(1);
        send_seq();
        arrive(4);
      end
    join
    chk(n_aes_ok > 0, "no correct AES encryption");
    chk(n_aes_fault > 0, "no faulty AES encryption");
    chk(n_fast > 0 && n_slow > 0, "modulation levels not both seen");
    chk(n_ovfl > 0, "counter overflow never happened");
    chk(n_reload > 0, "mismatch reload never happened");
    chk(n_trig == 2 && n_leak == 2, "trigger/key leak count");
    $display("mechanisms: aes_ok=%0d aes_fault=%0d overclocked_but_clean=%0d fast=%0d slow=%0d ovfl=%0d reload=%0d trig=%0d leak=%0d",
             n_aes_ok, n_aes_fault, n_aes_nofault_oc, n_fast, n_slow, n_ovfl, n_reload, n_trig, n_leak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
