// iq_mixer: the two multipliers of the digital quadrature detector.
// Each ADC sample x is multiplied by the LO words: i = x * cos, q = x * sin.
// Widths follow the firmware block diagram (16-bit ADC, 18-bit LO); the
// full 34-bit products are kept and passed on so that the moving average
// loses nothing. One register stage: products appear one cycle after
// in_valid, with out_valid.
module iq_mixer
  import lsync_pkg::*;
#(
  parameter int unsigned X_W = ADC_W,
  parameter int unsigned L_W = LO_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [X_W-1:0]    x,
  input  logic signed [L_W-1:0]    lo_cos,
  input  logic signed [L_W-1:0]    lo_sin,
  output logic                     out_valid,
  output logic signed [X_W+L_W-1:0] i_prod,
  output logic signed [X_W+L_W-1:0] q_prod
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_prod    <= '0;
      q_prod    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_prod <= x * lo_cos;
        q_prod <= x * lo_sin;
      end
    end
  end

endmodule
