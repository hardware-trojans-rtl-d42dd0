// tb_tr_minicircuit: one set of three mini-circuits, with the testbench
// playing the master (relaying PRNG words, masking, reconstructing).
// Reduced trigger: 6-bit counter, threshold 20, 8-bit sequence 10110101.
// Checks, per encryption: alpha_1^alpha_2^alpha_3 = 0 and the same for beta;
// no mini-circuit sees the plaintext or key in clear; done arrives exactly
// two clocks after start; the three reconstructions agree and equal
// plaintext ^ key, or the key itself when the reference says the trigger
// sequence has just been completed. The sequence is sent twice, with random
// traffic and a broken attempt in between.
module tb_tr_minicircuit;
  import tr_pkg::*;
  localparam logic [7:0] SEQ = 8'b1011_0101;
  logic clk = 0, rst_n = 0;
  rnd_t  rnd [3], rnd_nb [3];
  corr_t corr [3];
  m2s_t  m2s [3];
  s2m_t  s2m [3];
  logic  f_trig [3];
  logic  start = 0;
  word_t v = 0, k = 0;
  int checks = 0, failures = 0, pos = 0, n_trig = 0, n_slow = 0, n_fast = 0;

  for (genvar j = 0; j < 3; j++) begin : g_dut
    tr_minicircuit #(
      .SEED_A(128'h1111 * (j + 1) + 128'h5), .SEED_B(128'h7777 * (j + 3)),
      .CNT_W(6), .THRESH(20), .SEQ_W(8), .SEQ(SEQ)
    ) dut (.clk, .rst_n, .rnd(rnd[j]), .rnd_nb(rnd_nb[j]), .corr(corr[j]),
           .m2s(m2s[j]), .s2m(s2m[j]), .f_trig(f_trig[j]));
    assign rnd_nb[j]    = rnd[(j+1)%3];
    assign m2s[j].start = start;
    assign m2s[j].x     = v ^ corr[(j+2)%3].alpha;
    assign m2s[j].y     = k ^ corr[(j+2)%3].beta;
  end

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // One plaintext arrival; the counter sees g+1 clocks since the last pulse.
  task automatic arrive(int g);
    logic lvl;
    word_t o1, o2, o3, expv;
    repeat (g) @(negedge clk);
    lvl = (g + 1) > 20;             // the pulse clock itself is not counted
    if (lvl) n_slow++; else n_fast++;
    if (pos == 8) pos = 0;
    else if (lvl == SEQ[7-pos]) pos++;
    else pos = 0;
    v = {$urandom, $urandom, $urandom, $urandom};
    k = {$urandom, $urandom, $urandom, $urandom};
    start = 1;
    #1;
    chk((corr[0].alpha ^ corr[1].alpha ^ corr[2].alpha) == '0, "alpha not correlated");
    chk((corr[0].beta ^ corr[1].beta ^ corr[2].beta) == '0, "beta not correlated");
    for (int j = 0; j < 3; j++)
      chk(m2s[j].x != v && corr[j].alpha != '0 && m2s[j].y != k, "input seen in clear");
    @(negedge clk);
    start = 0;
    chk(!s2m[0].done, "done too early");
    @(negedge clk);
    chk(s2m[0].done && s2m[1].done && s2m[2].done, "done missing two clocks after start");
    o1 = s2m[0].res.s0 ^ s2m[1].res.s1;
    o2 = s2m[1].res.s0 ^ s2m[2].res.s1;
    o3 = s2m[2].res.s0 ^ s2m[0].res.s1;
    expv = (pos == 8) ? k : (v ^ k);
    if (pos == 8) n_trig++;
    chk(o1 == o2 && o2 == o3, "reconstructions disagree");
    chk(o1 == expv, $sformatf("result %032h expected %032h (matched %0d)", o1, expv, pos));
    chk(f_trig[0] == (pos == 8), "f_trig");
  endtask

  task automatic send_seq();
    for (int i = 7; i >= 0; i--) arrive(SEQ[i] ? 25 + $urandom % 30 : 3 + $urandom % 15);
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
    arrive(5);
    for (int i = 0; i < 20; i++) arrive(3 + $urandom % 50);
    arrive(5); arrive(5);                // fast, fast: clears a partial match
    send_seq();
    arrive(4);                           // reload
    arrive(40); arrive(4); arrive(4);    // broken attempt
    arrive(5);
    send_seq();
    arrive(30);
    chk(n_trig == 2 && n_slow > 0 && n_fast > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
