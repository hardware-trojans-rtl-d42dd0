// timing_fault_model: behavioural model (not synthesizable logic) of the
// parametric hardware Trojan of the round-pipelined AES.
//
// The Trojan adds no gates: the thirteen LUTs that compute byte [31:24] of
// the round-7 result (SubBytes/ShiftRows and AddRoundKey of that byte) are
// placed and routed far away, so those eight paths have about -11 to -13 ns
// of slack at a 10 ns period while every other path keeps positive slack.
// Above a trigger frequency the D8 register then captures a metastable,
// effectively random value for that byte. This model stands in for those
// slowed paths: once per clock it draws the error byte that D8 captures,
// given the frequency the chip is run at.
//
// Behaviour per clock edge follows the measured error rates of the modified
// design (5000 encryptions per frequency). The probability that the byte is
// wrong, in per mille, is 0 below F_TRIG_MHZ (65 MHz, where the first
// errors appear), then 30 at 65 MHz, 530 at 70 MHz, 865 at 72 MHz, 955 at
// 73 MHz and 997 at F_FULL_MHZ (80 MHz) and above, interpolated linearly in
// between; the interpolation and the use of the measured points as a table
// are this model's choices. A wrong byte is a uniformly random non-zero
// error mask; the measured spread of its Hamming weight with frequency is
// not modelled. err is registered and changes right after the clock edge,
// so the pipeline uses it at the following edge.
module timing_fault_model #(
  parameter int unsigned F_TRIG_MHZ = 65,
  parameter int unsigned F_FULL_MHZ = 80
) (
  input  logic        clk,
  input  logic [31:0] f_clk_mhz,
  output logic [7:0]  err
);

  // Measured points (MHz, per mille); the first and last are at the two
  // parameters, the middle three require F_TRIG_MHZ < 70 and F_FULL_MHZ > 73.
  localparam int unsigned NPT = 5;
  localparam int unsigned PT_F [NPT] = '{F_TRIG_MHZ, 70, 72, 73, F_FULL_MHZ};
  localparam int unsigned PT_P [NPT] = '{30, 530, 865, 955, 997};

  initial begin
    err = 8'h00;
    assert (F_TRIG_MHZ < 70 && F_FULL_MHZ > 73)
      else $error("measured points lie outside F_TRIG_MHZ..F_FULL_MHZ");
  end

  function automatic int unsigned permille(int unsigned f);
    if (f < PT_F[0]) return 0;
    for (int i = 0; i < NPT - 1; i++)
      if (f < PT_F[i+1])
        return PT_P[i] + (PT_P[i+1] - PT_P[i]) * (f - PT_F[i]) / (PT_F[i+1] - PT_F[i]);
    return PT_P[NPT-1];
  endfunction

  always @(posedge clk) begin : draw_err
    automatic int unsigned draw = $urandom;
    if ((draw >> 8) % 1000 < permille(f_clk_mhz))
      err <= 8'(1 + (draw & 32'hff) % 255);
    else
      err <= 8'h00;
  end

endmodule
