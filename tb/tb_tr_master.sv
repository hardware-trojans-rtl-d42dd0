// tb_tr_master: the master with behavioural mini-circuits written in the
// testbench (random PRNG words, correlated randoms, share latching and the
// 3-party key addition one clock after start). Two masters run side by
// side on the same mini-circuit models: MOE=0, whose mini-circuits return
// the shared key addition, and MOE=1, whose mini-circuits return the state
// share and whose master adds the key. Per block, the testbench can corrupt
// one share of a set (its reconstruction must fail) or shift a whole set to
// a consistent wrong value (it must be outvoted, unless two sets are
// shifted alike and win). Checked: the masks sent to
// every mini-circuit, out = plaintext ^ key three clocks after pt_valid,
// sub_mismatch per set, and error when no value has a majority.
module tb_tr_master;
  import tr_pkg::*;
  localparam int L = 3;
  logic clk = 0, rst_n = 0, pt_valid = 0;
  word_t plaintext = 0, key = 0;
  logic  ov_a, ov_b, err_a, err_b;
  word_t out_a, out_b;
  logic  mis_a [L], mis_b [L];
  rnd_t  rnd [L][3], nb_a [L][3], nb_b [L][3];
  corr_t corr [L][3];
  m2s_t  m2s_a [L][3], m2s_b [L][3];
  s2m_t  s2m_a [L][3], s2m_b [L][3];
  share_t vsh [L][3], ksh [L][3];
  logic  pend = 0;
  // Per-set corruption for the block in flight: 0 none, 1 one share, 2 consistent shift.
  int    mode [L];
  int checks = 0, failures = 0;
  int n_mis = 0, n_outvoted = 0, n_err = 0;

  tr_master #(.LAMBDA(L), .MOE(1'b0)) dut_a (.clk, .rst_n, .pt_valid, .plaintext, .key,
    .out_valid(ov_a), .out(out_a), .error(err_a), .sub_mismatch(mis_a),
    .rnd, .rnd_nb(nb_a), .corr, .m2s(m2s_a), .s2m(s2m_a));
  tr_master #(.LAMBDA(L), .MOE(1'b1)) dut_b (.clk, .rst_n, .pt_valid, .plaintext, .key,
    .out_valid(ov_b), .out(out_b), .error(err_b), .sub_mismatch(mis_b),
    .rnd, .rnd_nb(nb_b), .corr, .m2s(m2s_b), .s2m(s2m_b));

  always #5 clk = ~clk;

  // Behavioural mini-circuits.
  always_comb
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 3; j++) begin
        corr[i][j].alpha = rnd[i][j].ra ^ nb_a[i][j].ra;
        corr[i][j].beta  = rnd[i][j].rb ^ nb_a[i][j].rb;
      end

  always @(posedge clk) begin
    pend <= pt_valid;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 3; j++) begin
        s2m_a[i][j].done <= pend;
        s2m_b[i][j].done <= pend;
        if (pt_valid) begin
          vsh[i][j] <= '{s0: corr[i][j].alpha, s1: m2s_a[i][j].x};
          ksh[i][j] <= '{s0: corr[i][j].beta,  s1: m2s_a[i][j].y};
          rnd[i][j] <= '{ra: {$urandom, $urandom, $urandom, $urandom},
                         rb: {$urandom, $urandom, $urandom, $urandom}};
        end
        if (pend) begin
          share_t ra, rb;
          ra = '{s0: vsh[i][j].s0 ^ ksh[i][j].s0, s1: vsh[i][j].s1 ^ ksh[i][j].s1};
          rb = vsh[i][j];
          if (mode[i] == 1 && j == 1) begin ra.s1 ^= 128'h1; rb.s1 ^= 128'h1; end
          if (mode[i] == 2) begin ra.s0 ^= 128'hff; rb.s0 ^= 128'hff; end
          s2m_a[i][j].res <= ra;
          s2m_b[i][j].res <= rb;
        end
      end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic block(int m0, int m1, int m2);
    word_t v, k;
    int good, shifted;
    bit expect_err;
    word_t expv;
    v = {$urandom, $urandom, $urandom, $urandom};
    k = {$urandom, $urandom, $urandom, $urandom};
    mode[0] = m0; mode[1] = m1; mode[2] = m2;
    good = (m0 == 0) + (m1 == 0) + (m2 == 0);
    shifted = (m0 == 2) + (m1 == 2) + (m2 == 2);
    expect_err = good < 2 && shifted < 2;
    expv = (good >= 2) ? (v ^ k) : (v ^ k ^ 128'hff);   // shifted sets agree among themselves
    @(negedge clk);
    pt_valid = 1; plaintext = v; key = k;
    #1;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 3; j++) begin
        chk(m2s_a[i][j].start, "start not sent");
        chk(m2s_a[i][j].x == (v ^ corr[i][(j+2)%3].alpha), "x mask");
        chk(m2s_a[i][j].y == (k ^ corr[i][(j+2)%3].beta), "y mask");
        chk(nb_a[i][j] == rnd[i][(j+1)%3], "relay");
      end
    @(negedge clk); pt_valid = 0;
    @(negedge clk);
    chk(!ov_a && !ov_b, "output too early");
    @(negedge clk);
    chk(ov_a && ov_b, "output not three clocks after input");
    for (int i = 0; i < L; i++) begin
      chk(mis_a[i] == (mode[i] == 1), $sformatf("sub_mismatch[%0d]", i));
      chk(mis_b[i] == (mode[i] == 1), $sformatf("MOE sub_mismatch[%0d]", i));
      if (mode[i] == 1) n_mis++;
    end
    chk(err_a == expect_err && err_b == expect_err, "error flag");
    if (expect_err) n_err++;
    else begin
      chk(out_a == expv, $sformatf("out %032h expected %032h", out_a, expv));
      chk(out_b == expv, "MOE out");
      if (good < 3) n_outvoted++;
    end
    @(negedge clk);
    chk(!ov_a, "out_valid longer than one clock");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = '{0, 0, 0};
    for (int i = 0; i < L; i++)
      for (int j = 0; j < 3; j++) rnd[i][j] = '{ra: 128'(3*i+j+1), rb: 128'(100+3*i+j)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    block(0, 0, 0);
    block(1, 0, 0);
    block(0, 2, 0);
    block(0, 0, 1);
    block(1, 2, 0);
    block(2, 2, 0);
    for (int n = 0; n < 40; n++) block($urandom % 3, $urandom % 3, $urandom % 3);
    chk(n_mis > 0 && n_outvoted > 0 && n_err > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
