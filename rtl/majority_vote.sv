// majority_vote: the master's vote MAJ over the results of the LAMBDA
// sub-circuits.
//
// Inputs are LAMBDA words, each with an ok bit (its reconstruction
// succeeded). A word wins when strictly more than LAMBDA/2 of the ok inputs
// carry that same word; the first winning index drives out and found = 1.
// If no word has a strict majority, found = 0 and out is zero. Purely
// combinational: LAMBDA*LAMBDA word comparators. The strict-majority rule
// and the zero output on failure are this design's reading of the vote.
module majority_vote #(
  parameter int LAMBDA = 3,
  parameter int W      = 128
) (
  input  logic [W-1:0] vals [LAMBDA],
  input  logic         ok   [LAMBDA],
  output logic [W-1:0] out,
  output logic         found
);

  localparam int CW = $clog2(LAMBDA + 1);

  always_comb begin
    logic [CW-1:0] cnt;
    out   = '0;
    found = 1'b0;
    for (int i = 0; i < LAMBDA; i++) begin
      cnt = '0;
      for (int j = 0; j < LAMBDA; j++)
        if (ok[i] && ok[j] && vals[j] == vals[i]) cnt = cnt + 1'b1;
      if (!found && 2 * int'(cnt) > LAMBDA) begin
        found = 1'b1;
        out   = vals[i];
      end
    end
  end

endmodule
