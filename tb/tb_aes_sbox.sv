// tb_aes_sbox: exhaustive check of the S-box against an independent
// reference: the inverse is found by searching for y with x*y = 1 using a
// shift-and-add GF(2^8) multiplier written here, then the affine map is
// applied as the matrix-vector product with constant 0x63. Known values
// (00->63, 01->7c, 53->ed, ff->16) are checked too.
module tb_aes_sbox;
  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte, .out_byte);

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = 0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 0;
    logic [7:0] y;
    localparam logic [7:0] ROW [8] = '{8'b11110001, 8'b11100011, 8'b11000111, 8'b10001111,
                                       8'b00011111, 8'b00111110, 8'b01111100, 8'b11111000};
    for (int c = 1; c < 256; c++) if (mul(x, 8'(c)) == 8'h01) inv = 8'(c);
    // ROW[i] bit k is matrix entry (i, k)
    for (int i = 0; i < 8; i++) y[i] = ^(ROW[i] & inv);
    return y ^ 8'h63;
  endfunction

  task automatic check(logic [7:0] x, logic [7:0] exp);
    in_byte = x; #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", x, out_byte, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'h00, 8'h63); check(8'h01, 8'h7c); check(8'h53, 8'hed); check(8'hff, 8'h16);
    for (int x = 0; x < 256; x++) check(8'(x), ref_sbox(8'(x)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
