// quad_detector: digital down-conversion of the digitised IF to baseband I/Q
// (the "Quadrature Detection" box of the firmware block diagram).
// Chain: lo_lut (5-entry cos/sin table) -> iq_mixer (x*cos, x*sin) ->
// moving_avg over 5 samples on each branch -> decimator by 100.
// For an ADC input x[n] = A cos(2 pi n/5 + phi), the outputs are
//   i = (5 A L / 2) cos(phi) / 2^SHIFT,   q = -(5 A L / 2) sin(phi) / 2^SHIFT
// with L = 2^17-1 the table amplitude, so atan2(q, i) = -phi.
// Timing: adc_valid marks each ADC sample (every clock at 125 MS/s); the ADC
// sample is registered once so that it meets the registered LO word; then
// mixer, moving average and decimator add one register each. One I/Q pair
// leaves per 100 valid samples (out_valid pulse).
// The chain structure and sizes follow the document; alignment registers and
// output scaling are this design's own.
module quad_detector
  import lsync_pkg::*;
#(
  parameter int unsigned MA_N   = MA_LEN,
  parameter int unsigned FACTOR = DEC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adc_valid,
  input  adc_t adc,
  output logic out_valid,
  output iq_t  iq
);

  localparam int unsigned PW = ADC_W + LO_W;          // 34
  localparam int unsigned SW = PW + $clog2(MA_N);      // 37

  lo_t  lo_cos, lo_sin;
  logic [2:0] lo_addr;
  adc_t adc_q;
  logic adc_vq;

  lo_lut u_lut (
    .clk, .rst_n, .en(adc_valid),
    .cos_o(lo_cos), .sin_o(lo_sin), .addr_o(lo_addr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_q  <= '0;
      adc_vq <= 1'b0;
    end else begin
      adc_vq <= adc_valid;
      if (adc_valid) adc_q <= adc;
    end
  end

  logic mix_v;
  logic signed [PW-1:0] i_prod, q_prod;

  iq_mixer #(.X_W(ADC_W), .L_W(LO_W)) u_mix (
    .clk, .rst_n, .in_valid(adc_vq), .x(adc_q),
    .lo_cos, .lo_sin,
    .out_valid(mix_v), .i_prod, .q_prod
  );

  logic ma_vi, ma_vq;
  logic signed [SW-1:0] i_sum, q_sum;

  moving_avg #(.LEN(MA_N), .IN_W(PW), .OUT_W(SW)) u_ma_i (
    .clk, .rst_n, .in_valid(mix_v), .x(i_prod), .out_valid(ma_vi), .y(i_sum)
  );
  moving_avg #(.LEN(MA_N), .IN_W(PW), .OUT_W(SW)) u_ma_q (
    .clk, .rst_n, .in_valid(mix_v), .x(q_prod), .out_valid(ma_vq), .y(q_sum)
  );

  decimator #(.FACTOR(FACTOR), .IN_W(SW), .OUT_W(IQ_W), .SHIFT(17)) u_dec (
    .clk, .rst_n, .in_valid(ma_vi),
    .i_in(i_sum), .q_in(q_sum),
    .out_valid, .i_out(iq.i), .q_out(iq.q)
  );

  // both branches run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) ma_vi == ma_vq)
    else $error("I/Q branches out of step");

  logic unused_addr;
  assign unused_addr = ^lo_addr;

endmodule
