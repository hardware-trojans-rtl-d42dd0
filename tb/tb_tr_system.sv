// tb_tr_system: the protected cipher end to end with a reduced trigger
// (6-bit counter, threshold 20, 8-bit sequence 10110101). Three systems
// see the same plaintext/key stream: all sets infected (AES payload), all
// sets infected with the MOE payload (key added by the master), and only
// set 0 infected. Reference: a matched-bit counter over the arrival gaps.
// Expected: output = plaintext ^ key, three clocks after pt_valid, except
// for the encryption that completes the sequence, where both fully infected
// systems output the key and the mostly honest one still outputs
// plaintext ^ key (the infected set is outvoted). error stays low.
module tb_tr_system;
  import tr_pkg::*;
  localparam logic [7:0] SEQ = 8'b1011_0101;
  logic clk = 0, rst_n = 0, pt_valid = 0;
  word_t plaintext = 0, key = 0;
  logic  ov [3], er [3];
  word_t out [3];
  logic  mis [3][3];
  logic  ft [3][3][3];
  int checks = 0, failures = 0, pos = 0, n_trig = 0, n_slow = 0, n_fast = 0, n_ovfl = 0;

  tr_system #(.CNT_W(6), .THRESH(20), .SEQ_W(8), .SEQ(SEQ)) dut_aes (
    .clk, .rst_n, .pt_valid, .plaintext, .key, .out_valid(ov[0]), .out(out[0]),
    .error(er[0]), .sub_mismatch(mis[0]), .f_trig(ft[0]));
  tr_system #(.MOE(1'b1), .CNT_W(6), .THRESH(20), .SEQ_W(8), .SEQ(SEQ)) dut_moe (
    .clk, .rst_n, .pt_valid, .plaintext, .key, .out_valid(ov[1]), .out(out[1]),
    .error(er[1]), .sub_mismatch(mis[1]), .f_trig(ft[1]));
  tr_system #(.TROJAN_MASK(3'b001), .CNT_W(6), .THRESH(20), .SEQ_W(8), .SEQ(SEQ)) dut_one (
    .clk, .rst_n, .pt_valid, .plaintext, .key, .out_valid(ov[2]), .out(out[2]),
    .error(er[2]), .sub_mismatch(mis[2]), .f_trig(ft[2]));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Arrival after g clocks without arrival (the counter then holds g+2:
  // the task itself spends the pulse clock and two more before returning).
  task automatic arrive(int g);
    int c;
    logic lvl;
    word_t v, k;
    repeat (g) @(negedge clk);
    c = g + 3;
    lvl = (c % 64 > 20) || c >= 64;
    if (c >= 64) n_ovfl++;
    if (lvl) n_slow++; else n_fast++;
    if (pos == 8) pos = 0;
    else if (lvl == SEQ[7-pos]) pos++;
    else pos = 0;
    if (pos == 8) n_trig++;
    v = {$urandom, $urandom, $urandom, $urandom};
    k = {$urandom, $urandom, $urandom, $urandom};
    pt_valid = 1; plaintext = v; key = k;
    @(negedge clk); pt_valid = 0;
    @(negedge clk);
    @(negedge clk);
    chk(ov[0] && ov[1] && ov[2], "out_valid not three clocks after pt_valid");
    chk(!er[0] && !er[1] && !er[2], "error raised");
    chk(out[0] == ((pos == 8) ? k : v ^ k), "all-infected AES payload system");
    chk(out[1] == ((pos == 8) ? k : v ^ k), "all-infected MOE payload system");
    chk(out[2] == (v ^ k), "one infected set should be outvoted");
    chk(ft[2][1][0] == 1'b0 && ft[2][2][2] == 1'b0, "honest sets must not trigger");
    chk(ft[0][2][1] == (pos == 8), "f_trig");
  endtask

  task automatic send_seq();
    for (int i = 7; i >= 0; i--) arrive(SEQ[i] ? 25 + $urandom % 30 : $urandom % 12);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    arrive(2);
    for (int i = 0; i < 30; i++) arrive($urandom % 90);
    arrive(1); arrive(1);
    send_seq();
    arrive(3);
    arrive(70);                 // long gap: counter overflow, read as slow
    arrive(2); arrive(2);       // 1, 0 matched, then a fast arrival breaks the match
    send_seq();
    arrive(5);
    chk(n_trig == 2 && n_ovfl > 0 && n_slow > 0 && n_fast > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
