// tb_timing_fault_model: runs the fault model at several clock frequencies
// for 2000 clocks each and checks the error counts: never an error below
// 65 MHz, and at 65, 66, 70, 72, 73, 80 and 100 MHz a count inside a window
// of about four standard deviations around the measured rate (30, 130, 530,
// 865, 955 and 997 per mille).
module tb_timing_fault_model;
  logic clk = 0;
  logic [31:0] f_clk_mhz = 0;
  logic [7:0] err;
  int checks = 0, failures = 0;

  timing_fault_model dut (.clk, .f_clk_mhz, .err);

  always #5 clk = ~clk;


  task automatic measure(int f, int n, output int nerr);
    f_clk_mhz = f;
    @(posedge clk);
    nerr = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (err != 0) nerr++;
    end
  endtask

  task automatic expect_range(int f, int lo, int hi);
    int nerr;
    measure(f, 2000, nerr);
    checks++;
    if (nerr < lo || nerr > hi) begin
      failures++;
      $display("FAIL at %0d MHz: %0d errors in 2000 clocks, expected %0d..%0d", f, nerr, lo, hi);
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
    expect_range(10, 0, 0);
    expect_range(43, 0, 0);
    expect_range(64, 0, 0);
    expect_range(65, 20, 120);      // 30 per mille
    expect_range(66, 170, 360);     // 130 per mille
    expect_range(70, 900, 1220);    // 530 per mille
    expect_range(72, 1600, 1850);   // 865 per mille
    expect_range(73, 1840, 1970);   // 955 per mille
    expect_range(80, 1970, 2000);   // 997 per mille
    expect_range(100, 1970, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
