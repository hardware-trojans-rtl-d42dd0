// tb_majority_vote: random votes over 3 and 5 sets with values drawn from a
// small pool so that ties, majorities and failed sets all occur. The
// reference counts, for each value, the ok sets carrying it; a value with a
// count above LAMBDA/2 must be output with found = 1, otherwise found = 0.
module tb_majority_vote;
  logic [15:0] v3 [3], v5 [5], o3, o5;
  logic ok3 [3], ok5 [5], f3, f5;
  int checks = 0, failures = 0, n_found = 0, n_none = 0;

  majority_vote #(.LAMBDA(3), .W(16)) dut3 (.vals(v3), .ok(ok3), .out(o3), .found(f3));
  majority_vote #(.LAMBDA(5), .W(16)) dut5 (.vals(v5), .ok(ok5), .out(o5), .found(f5));

  function automatic void expect3(output logic ef, output logic [15:0] ev);
    ef = 0; ev = 0;
    for (int i = 0; i < 3; i++) begin
      int c = 0;
      for (int j = 0; j < 3; j++) if (ok3[j] && ok3[i] && v3[j] == v3[i]) c++;
      if (c >= 2 && !ef) begin ef = 1; ev = v3[i]; end
    end
  endfunction

  function automatic void expect5(output logic ef, output logic [15:0] ev);
    ef = 0; ev = 0;
    for (int i = 0; i < 5; i++) begin
      int c = 0;
      for (int j = 0; j < 5; j++) if (ok5[j] && ok5[i] && v5[j] == v5[i]) c++;
      if (c >= 3 && !ef) begin ef = 1; ev = v5[i]; end
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: two sets agree against one.
    v3 = '{16'h1234, 16'hbeef, 16'h1234}; ok3 = '{1, 1, 1};
    #1; checks++;
    if (!(f3 && o3 == 16'h1234)) begin failures++; $display("FAIL directed 2-of-3"); end
    ok3 = '{1, 1, 0};
    #1; checks++;
    if (f3) begin failures++; $display("FAIL directed: no majority expected"); end
    for (int i = 0; i < 2000; i++) begin
      logic ef; logic [15:0] ev;
      foreach (v3[k]) begin v3[k] = 16'($urandom % 3); ok3[k] = ($urandom % 5) != 0; end
      foreach (v5[k]) begin v5[k] = 16'($urandom % 3); ok5[k] = ($urandom % 5) != 0; end
      #1;
      expect3(ef, ev);
      checks++;
      if (f3 !== ef || (ef && o3 !== ev)) begin failures++; $display("FAIL vote3"); end
      if (ef) n_found++; else n_none++;
      expect5(ef, ev);
      checks++;
      if (f5 !== ef || (ef && o5 !== ev)) begin failures++; $display("FAIL vote5"); end
    end
    checks++;
    if (n_found == 0 || n_none == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
