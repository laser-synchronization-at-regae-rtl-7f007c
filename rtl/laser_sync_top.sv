// laser_sync_top: FPGA firmware of an RF-based laser synchronisation loop
// that measures the laser phase at an intermediate frequency.
// A harmonic of the laser repetition rate (~3 GHz) is mixed down outside the
// FPGA to an IF of about 25 MHz and digitised at about 125 MS/s (16 bits).
// This module turns those samples into a piezo drive word:
//   quad_detector  IF -> baseband I/Q (5-entry LO table, mixers, 5-sample
//                  moving average, decimation by 100)
//   iq_rotator     phase alignment of I/Q by a host-set angle a
//   cordic         amplitude and phase, 17 iterations
//   iir_filter     notch or low-pass on the phase, with bypass
//   phase_error    set-point minus filtered phase
//   pi_controller  series PI controller, 17-bit output
//   ff_offset_adder adds the feed-forward (coarse piezo) offset -> 18-bit DAC
// The block order, the sizes and the bus widths follow the firmware block
// diagram of the document; fixed-point scalings, register stages and the
// valid strobes are this design's own.
// Interface: adc/adc_valid from the ADC (adc_valid high every clock in the
// real system); cfg carries the host-written registers; dac is the DAC word,
// held between controller updates; mon carries the monitor points.
// Timing: one controller update per 100 ADC samples. From the clock edge that
// takes the last ADC sample of a decimation group to the edge that loads the
// new DAC word there are 28 edges (detector 4, rotator 1, CORDIC 18, IIR 1,
// error 1, PI 2, DAC register 1). The ADC monitor tap is the last valid
// sample, registered.
module laser_sync_top
  import lsync_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adc_valid,
  input  adc_t       adc,
  input  lsync_cfg_t cfg,
  output dac_t       dac,
  output logic       ctrl_update,   // pulses when a new controller output is taken
  output lsync_mon_t mon
);

  logic   qd_v, rot_v, cor_v, iir_v, err_v, pi_v, cor_busy, int_sat;
  iq_t    iq_dec, iq_rot;
  ampl_t  ampl;
  phase_t phase, phase_filt, phase_iir, err;
  ctrl_t  pi_u, pi_int;

  quad_detector u_qd (
    .clk, .rst_n, .adc_valid, .adc,
    .out_valid(qd_v), .iq(iq_dec)
  );

  iq_rotator u_rot (
    .clk, .rst_n, .in_valid(qd_v), .iq_in(iq_dec),
    .rot_cos(cfg.rot_cos), .rot_sin(cfg.rot_sin),
    .out_valid(rot_v), .iq_out(iq_rot)
  );

  cordic u_cordic (
    .clk, .rst_n, .in_valid(rot_v), .iq(iq_rot),
    .busy(cor_busy), .out_valid(cor_v), .ampl, .phase
  );

  iir_filter u_iir (
    .clk, .rst_n, .in_valid(cor_v), .x(phase),
    .coef(cfg.iir_coef), .bypass(cfg.iir_bypass),
    .out_valid(iir_v), .y_filt(phase_iir), .y(phase_filt)
  );

  phase_error u_err (
    .clk, .rst_n, .in_valid(iir_v), .phase(phase_filt),
    .setpoint(cfg.setpoint),
    .out_valid(err_v), .err
  );

  pi_controller u_pi (
    .clk, .rst_n, .in_valid(err_v), .err,
    .kp(cfg.kp), .ki(cfg.ki),
    .out_valid(pi_v), .u(pi_u), .int_mon(pi_int), .int_sat
  );

  ff_offset_adder u_ff (
    .clk, .rst_n, .ctrl(pi_u), .offset(cfg.ff_offset), .dac
  );

  assign ctrl_update = pi_v;

  adc_t adc_mon;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         adc_mon <= '0;
    else if (adc_valid) adc_mon <= adc;
  end

  always_comb begin
    mon.adc        = adc_mon;
    mon.iq_dec     = iq_dec;
    mon.iq_rot     = iq_rot;
    mon.ampl       = ampl;
    mon.phase      = phase;
    mon.phase_filt = phase_filt;
    mon.error      = err;
    mon.pi_int     = pi_int;
    mon.pi_out     = pi_u;
    mon.dac        = dac;
    mon.pi_sat     = int_sat;
  end

  // the raw IIR output and the CORDIC busy flag
  // are internal status only
  logic unused_status;
  assign unused_status = ^{phase_iir, cor_busy};

endmodule
