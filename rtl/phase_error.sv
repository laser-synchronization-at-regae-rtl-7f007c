// phase_error: control error of the feedback loop, the filtered phase
// subtracted from the phase set-point (normally 0):  e = setpoint - phase.
// Both are 18-bit phases with 2^17 LSB = pi; the subtraction wraps modulo
// 2 pi (two's-complement wrap), so the error is always the shortest way
// round the circle, in [-pi, pi). The wrapping is this design's choice.
// One register stage: e and out_valid one cycle after in_valid.
module phase_error
  import lsync_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  phase_t phase,
  input  phase_t setpoint,
  output logic   out_valid,
  output phase_t err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) err <= setpoint - phase;
    end
  end

endmodule
