// tb_share_reconstruct: builds the three shares of random secrets exactly as
// the sharing step does (alpha_1 ^ alpha_2 ^ alpha_3 = 0, x_l = v ^ alpha_l,
// mini-circuit j holds (alpha_j, x_(j-1))) and checks that v comes back
// with no mismatch; then flips one random bit of one random share half and
// checks that the mismatch is raised.
module tb_share_reconstruct;
  import tr_pkg::*;
  share_t sh [3];
  word_t  out;
  logic   mismatch;
  int checks = 0, failures = 0;

  share_reconstruct dut (.sh, .out, .mismatch);

  function automatic word_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      word_t v, a [3], x [3];
      v = rnd(); a[0] = rnd(); a[1] = rnd(); a[2] = a[0] ^ a[1];
      for (int l = 0; l < 3; l++) x[l] = v ^ a[l];
      for (int j = 0; j < 3; j++) sh[j] = '{s0: a[j], s1: x[(j+2)%3]};
      #1;
      checks += 2;
      if (out !== v) begin failures++; $display("FAIL out %032h expected %032h", out, v); end
      if (mismatch !== 1'b0) begin failures++; $display("FAIL false mismatch"); end
      begin
        int j, b;
        j = $urandom % 3; b = $urandom % 256;
        sh[j] = sh[j] ^ (256'(1) << b);
        #1;
        checks++;
        if (mismatch !== 1'b1) begin failures++; $display("FAIL corrupted share %0d bit %0d not flagged", j, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
