// tb_aes_fault_sweep: the error-rate sweep of the timing-fault Trojan.
// The top runs at its default parameters; 5000 random AES-128 blocks are
// streamed back to back through the pipeline at each of 64, 65, 70, 72, 73
// and 80 MHz. Every ciphertext must equal the reference encryption with the
// error byte that D8 captured for that block XORed into S(0,3) after round
// 7 (zero if none), and must arrive 10 clocks after its plaintext. The
// number of faulty ciphertexts per frequency must lie within about four
// standard deviations of the measured rate (0, 30, 530, 865, 955 and 997
// per mille).
module tb_aes_fault_sweep;
  import tb_aes_ref_pkg::*;
  localparam int N = 5000;
  localparam int NF = 6;
  localparam int FREQ [NF] = '{64, 65, 70, 72, 73, 80};
  localparam int LO   [NF] = '{0, 80, 2500, 4220, 4700, 4970};
  localparam int HI   [NF] = '{0, 230, 2800, 4430, 4850, 5000};
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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // One batch: block n is driven at negedge n, D8 captures it after the
  // negedge n+7 (where the error byte is sampled), and it leaves at negedge
  // n+10.
  task automatic batch(int fi);
    logic [127:0] p [N], k [N];
    logic [7:0] e [N];
    int nbad = 0;
    f_clk_mhz = FREQ[fi];
    for (int c = 0; c < N + 10; c++) begin
      @(negedge clk);
      if (c >= 7 && c - 7 < N) e[c-7] = aes_fault;
      if (c >= 10) begin
        chk(aes_out_valid, "ciphertext not 10 clocks after its plaintext");
        chk(aes_ciphertext == ref_encrypt(p[c-10], k[c-10], e[c-10]), "ciphertext");
        if (e[c-10] != 0) nbad++;
      end else
        chk(!aes_out_valid, "early output");
      if (c < N) begin
        p[c] = {$urandom, $urandom, $urandom, $urandom};
        k[c] = {$urandom, $urandom, $urandom, $urandom};
        aes_in_valid = 1; aes_plaintext = p[c]; aes_key = k[c];
      end else aes_in_valid = 0;
    end
    @(negedge clk);
    chk(!aes_out_valid, "output after the batch");
    chk(nbad >= LO[fi] && nbad <= HI[fi], $sformatf("faulty count %0d at %0d MHz", nbad, FREQ[fi]));
    $display("%0d MHz: %0d of %0d ciphertexts faulty", FREQ[fi], nbad, N);
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
    for (int fi = 0; fi < NF; fi++) batch(fi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
