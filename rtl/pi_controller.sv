// pi_controller: proportional-integral controller of the laser phase loop.
// It follows the bus widths printed in the firmware block diagram: 18-bit
// error, 16-bit Kp and Ki, a 25-bit product, a 25-bit Z^-1 accumulator, a
// 33-bit Ki product and a 17-bit output. The way these are wired is read here
// as the series form  u = Kp e + Ki * sum(Kp e):
//   p25  = (e * Kp)[33:9]                    18x16 -> 34 bits, top 25 kept
//   acc  = sat25(acc + p25)                  integrator (Z^-1 loop, 25 bits)
//   i33  = acc[24:8] * Ki                    17x16 -> 33 bits
//   u    = sat17(p25[24:8] + i33[32:16])     17-bit controller output
// Kp and Ki are signed host-written gains. The accumulator saturates instead
// of wrapping (anti-windup, this design's choice); 'int_sat' is high while
// the latest update clipped it.
// Timing: one update per in_valid (about 1.25 MS/s). The accumulator is
// updated one cycle after in_valid and the output one cycle after that;
// out_valid marks the new output (two cycles after in_valid).
module pi_controller
  import lsync_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  phase_t err,
  input  gain_t  kp,
  input  gain_t  ki,
  output logic   out_valid,
  output ctrl_t  u,
  output ctrl_t  int_mon,   // integrator, top 17 bits (monitor)
  output logic   int_sat
);

  localparam int unsigned PW = 25;

  // The low bits of pfull, p25_q and i33 are dropped on purpose (truncation
  // to the printed widths).

  logic signed [PH_W+GAIN_W-1:0] pfull;       // 34
  logic signed [PW-1:0]          p25, p25_q;
  logic signed [PW-1:0]          acc;
  logic signed [PW:0]            acc_sum;
  logic signed [CTRL_W+GAIN_W-1:0] i33;       // 33
  logic signed [CTRL_W:0]        u_sum;
  logic                          v1;

  always_comb begin
    pfull   = err * kp;
    p25     = pfull[PH_W+GAIN_W-1 -: PW];
    acc_sum = (PW+1)'(acc) + (PW+1)'(p25);
    i33     = $signed(acc[PW-1 -: CTRL_W]) * ki;
    u_sum   = (CTRL_W+1)'($signed(p25_q[PW-1 -: CTRL_W]))
            + (CTRL_W+1)'($signed(i33[CTRL_W+GAIN_W-1 -: CTRL_W]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; p25_q <= '0; v1 <= 1'b0;
      u <= '0; out_valid <= 1'b0; int_sat <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        p25_q <= p25;
        acc   <= PW'(sat(64'(acc_sum), PW));
        int_sat <= (acc_sum != (PW+1)'(sat(64'(acc_sum), PW)));
      end
      if (v1) u <= CTRL_W'(sat(64'(u_sum), CTRL_W));
    end
  end

  assign int_mon = acc[PW-1 -: CTRL_W];

endmodule
