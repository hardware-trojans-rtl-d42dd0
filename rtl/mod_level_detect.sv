// mod_level_detect: first stage of the Trojan trigger. It measures the time
// between two plaintext arrivals and classifies it as one of two modulation
// levels.
//
// A CNT_W-bit counter is cleared on every clock where fsm_rst (the active-
// high reset of the cipher's control FSM, pulsed for each new plaintext) is
// high and counts up on every other clock, wrapping at its maximum. The
// level is m_t = (cnt > THRESH) | f_ovfl: 1 means a slow arrival (a long
// gap), 0 a fast one. f_ovfl is set when the counter holds its all-ones
// value (about to wrap) and stays set until the next fsm_rst, so a gap long
// enough to wrap the counter is still read as slow. m_t is combinational
// from the current count, so on the fsm_rst clock it reports the gap that
// has just ended, and the counter and flag restart on that same edge.
// Structure, widths and the 33,000,000-cycle threshold (0.5 s at 66 MHz)
// follow the trigger design; the global reset (clearing both registers, as
// a plaintext arrival would) is this design's choice.
module mod_level_detect #(
  parameter int          CNT_W  = 25,
  parameter int unsigned THRESH = 33_000_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fsm_rst,
  output logic             m_t,
  output logic             f_ovfl,
  output logic [CNT_W-1:0] cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      f_ovfl <= 1'b0;
    end else if (fsm_rst) begin
      cnt    <= '0;
      f_ovfl <= 1'b0;
    end else begin
      cnt    <= cnt + 1'b1;
      f_ovfl <= f_ovfl | (&cnt);
    end
  end

  assign m_t = (cnt > CNT_W'(THRESH)) | f_ovfl;

endmodule
