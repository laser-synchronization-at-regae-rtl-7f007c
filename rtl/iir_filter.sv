// iir_filter: IIR stage on the measured phase that can act as a notch filter
// (to suppress the piezo self-resonance, about 50 kHz) or as a low-pass filter
// (to reduce the open-loop bandwidth), followed by the bypass multiplexer of
// the firmware block diagram (18-bit data, "bypass" select).
// The document gives the function, not the structure; this design uses one
// second-order section (biquad), direct form I, whose five host-written
// coefficients choose notch or low-pass:
//   y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]
// Coefficients are signed Q2.16 (18 bits, range -2 .. 2-2^-16). Products are
// kept at full width, summed, shifted right by 16 and saturated to 18 bits.
// Example at 1.249 MS/s: notch at 50 kHz with pole radius r: b = g*(1,
// -2cos w0, 1), a = (-2 r cos w0, r^2), w0 = 2 pi 50e3/1.249e6.
// Timing: one sample per in_valid, result and out_valid one cycle later. The
// filter keeps running while bypassed, so switching back is glitch-free.
module iir_filter
  import lsync_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  phase_t       x,
  input  biquad_coef_t coef,
  input  logic         bypass,
  output logic         out_valid,
  output phase_t       y_filt,   // filter output (monitor)
  output phase_t       y         // after the bypass multiplexer
);

  localparam int unsigned PW = PH_W + COEF_W;   // 36
  localparam int unsigned AW = PW + 3;          // 39

  phase_t x1, x2, y1, y2;
  logic signed [PW-1:0] pb0, pb1, pb2, pa1, pa2;
  logic signed [AW-1:0] acc;
  phase_t ynew;

  always_comb begin
    pb0 = x  * coef.b0;
    pb1 = x1 * coef.b1;
    pb2 = x2 * coef.b2;
    pa1 = y1 * coef.a1;
    pa2 = y2 * coef.a2;
    acc = AW'(pb0) + AW'(pb1) + AW'(pb2) - AW'(pa1) - AW'(pa2);
    ynew = phase_t'(sat(64'(acc >>> 16), PH_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
      y_filt <= '0; y <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x;  x2 <= x1;
        y1 <= ynew; y2 <= y1;
        y_filt <= ynew;
        y <= bypass ? x : ynew;
      end
    end
  end

endmodule
