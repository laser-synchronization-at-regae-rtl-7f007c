// iq_rotator: matrix rotator used as a phase shifter on the detected I/Q
// (firmware block diagram: [cos(a) -sin(a); sin(a) cos(a)] with cos(a) and
// sin(a) as inputs). It lets the operator align the phase once the laser is
// locked:  i' = i cos(a) - q sin(a),   q' = i sin(a) + q cos(a).
// cos(a), sin(a) are host-written Q1.17 words (18 bits, this design's
// scaling); the results are shifted back by 17 bits and saturated to 18 bits.
// One register stage: result one cycle after in_valid.
module iq_rotator
  import lsync_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  iq_t  iq_in,
  input  lo_t  rot_cos,
  input  lo_t  rot_sin,
  output logic out_valid,
  output iq_t  iq_out
);

  logic signed [IQ_W+LO_W-1:0] p_ic, p_qs, p_is, p_qc;  // 36-bit products
  logic signed [IQ_W+LO_W:0]   ri, rq;                  // 37-bit sums
  always_comb begin
    p_ic = iq_in.i * rot_cos;
    p_qs = iq_in.q * rot_sin;
    p_is = iq_in.i * rot_sin;
    p_qc = iq_in.q * rot_cos;
    ri = (IQ_W+LO_W+1)'(p_ic) - (IQ_W+LO_W+1)'(p_qs);
    rq = (IQ_W+LO_W+1)'(p_is) + (IQ_W+LO_W+1)'(p_qc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      iq_out    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        iq_out.i <= IQ_W'(sat(64'(ri >>> 17), IQ_W));
        iq_out.q <= IQ_W'(sat(64'(rq >>> 17), IQ_W));
      end
    end
  end

endmodule
