// tb_mod_seq_detect: drives the default 80-bit detector with arrival pulses
// and levels. The reference counts how many leading bits of the sequence
// have been matched (reset to zero on a mismatch, and after a completed
// trigger on the next arrival); f_trig must be high exactly when all 80
// have been matched. Covers the full sequence, a mismatch after 40 bits
// followed by the full sequence, the reload after a trigger, random levels,
// and a run of five levels opposite to the sequence MSB that clears a
// partially matched state.
module tb_mod_seq_detect;
  localparam logic [79:0] SEQ = 80'h1234_9876_dead_beef_1235;
  logic clk = 0, rst_n = 0, fsm_rst = 0, m_t = 0;
  logic f_trig;
  logic [79:0] sr;
  int checks = 0, failures = 0, pos = 0, n_trig = 0, n_mismatch = 0;

  mod_seq_detect dut (.clk, .rst_n, .fsm_rst, .m_t, .f_trig, .sr);

  always #5 clk = ~clk;

  task automatic arrive(logic lvl);
    m_t = lvl; fsm_rst = 1;
    if (pos == 80) pos = 0;
    else if (lvl == SEQ[79-pos]) pos++;
    else begin pos = 0; n_mismatch++; end
    @(negedge clk);
    fsm_rst = 0;
    repeat ($urandom % 3) @(negedge clk);
    checks++;
    if (f_trig !== (pos == 80)) begin
      failures++; $display("FAIL f_trig=%b after %0d matched bits", f_trig, pos);
    end
    if (pos == 80) n_trig++;
  endtask

  task automatic send_seq();
    for (int i = 79; i >= 0; i--) arrive(SEQ[i]);
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
    @(negedge clk);
    checks++;
    if (sr !== SEQ || f_trig) begin failures++; $display("FAIL reset value"); end
    send_seq();                                   // trigger
    arrive(1'b1);                                 // reload
    for (int i = 79; i >= 40; i--) arrive(SEQ[i]);
    arrive(~SEQ[39]);                             // mismatch
    send_seq();
    arrive(1'b0);
    for (int i = 0; i < 300; i++) arrive(1'($urandom));
    for (int i = 79; i >= 10; i--) arrive(SEQ[i]);
    for (int i = 0; i < 5; i++) arrive(1'b0 ^ SEQ[79] ^ 1'b1);
    send_seq();
    checks++;
    if (n_trig < 3 || n_mismatch == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
