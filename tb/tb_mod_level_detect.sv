// tb_mod_level_detect: a 6-bit counter with threshold 20 (the 25-bit,
// 33,000,000-cycle default would need seconds of simulated time per gap).
// For each gap g between arrival pulses the expected level is
// (g mod 64 > 20) or (g >= 64): short gaps read fast, long gaps slow, and a
// gap that wraps the counter is still read slow through the overflow flag.
// The counter value at the pulse and the flag are checked too. A second
// instance at the default size checks its first 1000 cycles (fast).
module tb_mod_level_detect;
  localparam int CNT_W = 6;
  localparam int THRESH = 20;
  logic clk = 0, rst_n = 0, fsm_rst = 0;
  logic m_t, f_ovfl;
  logic [CNT_W-1:0] cnt;
  logic m_t_d, f_ovfl_d;
  logic [24:0] cnt_d;
  int checks = 0, failures = 0;
  int n_slow = 0, n_fast = 0, n_ovfl = 0;

  mod_level_detect #(.CNT_W(CNT_W), .THRESH(THRESH)) dut (.clk, .rst_n, .fsm_rst, .m_t, .f_ovfl, .cnt);
  mod_level_detect dut_def (.clk, .rst_n, .fsm_rst(1'b0), .m_t(m_t_d), .f_ovfl(f_ovfl_d), .cnt(cnt_d));

  always #5 clk = ~clk;

  task automatic gap(int g);
    logic exp_mt;
    repeat (g) @(negedge clk);      // g clocks without a pulse
    exp_mt = ((g % 64) > THRESH) || (g >= 64);
    checks += 3;
    if (m_t !== exp_mt) begin failures++; $display("FAIL gap %0d: m_t=%b", g, m_t); end
    if (cnt !== CNT_W'(g % 64)) begin failures++; $display("FAIL gap %0d: cnt=%0d", g, cnt); end
    if (f_ovfl !== (g >= 64)) begin failures++; $display("FAIL gap %0d: f_ovfl=%b", g, f_ovfl); end
    if (exp_mt) n_slow++; else n_fast++;
    if (g >= 64) n_ovfl++;
    fsm_rst = 1;
    @(negedge clk);
    fsm_rst = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    gap(5);
    gap(0); gap(20); gap(21); gap(19); gap(50); gap(63); gap(64); gap(65); gap(84); gap(100);
    gap(130); gap(1); gap(22);
    for (int i = 0; i < 30; i++) gap($urandom % 160);
    checks += 3;
    if (cnt_d == 0 || m_t_d !== 1'b0 || f_ovfl_d !== 1'b0) begin
      failures++; $display("FAIL default instance cnt=%0d m_t=%b", cnt_d, m_t_d);
    end
    if (n_slow == 0 || n_fast == 0) begin failures++; $display("FAIL level not both seen"); end
    if (n_ovfl == 0) begin failures++; $display("FAIL overflow never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
