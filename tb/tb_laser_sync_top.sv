// tb_laser_sync_top: end-to-end test of the laser synchronisation firmware
// with all parameters at their defaults, closed through a simple model of
// the laser: the ADC sees A cos(2 pi n/5 + phi) (IF at fs/5), and the DAC
// word acts on a piezo that changes the laser frequency, so the laser phase
// moves by  dphi = DRIFT - G * dac  per ADC sample (G > 0 gives negative
// feedback with the sign conventions of the chain).
// Phases run:
//  1 open loop, bypass: measured phase and amplitude against the known phi,
//    DAC equal to the feed-forward offset, update rate of one per 100 clocks
//  2 open loop, rotator set to a: the measured phase moves by a
//  3 loop closed, bypass: lock (small error), steady DAC = DRIFT/G
//  4 set-point step: the loop follows
//  5 notch filter mode with a 50 kHz phase oscillation on the laser (the
//    piezo resonance): the notch removes it from the loop; then low-pass
//    filter mode; the loop stays locked throughout
//  6 loop opened with a large error: the integrator clips
// Each mechanism is counted; one that never happened counts as a failure.
module tb_laser_sync_top;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, adc_valid = 0, ctrl_update;
  adc_t adc;
  lsync_cfg_t cfg;
  dac_t dac;
  lsync_mon_t mon;
  int checks = 0, failures = 0;

  localparam real PI    = 3.14159265358979;
  localparam real A     = 24000.0;
  localparam real LSB   = PI / 131072.0;            // phase LSB in rad
  localparam real G     = 2.0 * LSB / 100.0;        // rad per DAC LSB per sample
  real drift = 0.0;                                  // rad per sample
  real phi   = 0.7;
  localparam real FS    = 124.91e6;                 // ADC clock
  localparam real F_RES = 50.0e3;                   // piezo resonance
  real pm_amp = 0.0;                                 // 50 kHz phase modulation, rad
  bit  loop_closed = 0;
  longint n = 0, cyc = 0, t_prev = -1;
  int updates = 0;
  adc_t adc_taken;

  // mechanism counters
  int n_dec = 0, n_rot = 0, n_bypass = 0, n_notch = 0, n_lp = 0,
      n_setpt = 0, n_sat = 0, n_lock = 0, n_ff = 0, n_cordic = 0, n_res = 0;

  laser_sync_top dut (.clk, .rst_n, .adc_valid, .adc, .cfg, .dac, .ctrl_update, .mon);

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  function automatic real wrap(real v);
    while (v > PI) v -= 2.0 * PI;
    while (v < -PI) v += 2.0 * PI;
    return v;
  endfunction
  function automatic coef_t q216(real v);
    return coef_t'(int'($floor(v * 65536.0 + 0.5)));
  endfunction

  // laser + down-converter + ADC model
  always @(posedge clk) if (rst_n) begin
    adc_taken = adc;
    #1;
    adc_valid <= 1'b1;
    adc <= adc_t'(int'($floor(A * $cos(2.0 * PI * real'(n % 5) / 5.0 + phi
                                      + pm_amp * $sin(2.0 * PI * F_RES / FS * real'(n))) + 0.5)));
    n++;
    if (loop_closed) phi = wrap(phi + drift - G * real'(dac));
  end

  // ADC monitor tap holds the sample taken at the last edge
  always @(negedge clk) if (rst_n && adc_valid && (cyc % 97 == 0)) begin
    checks++;
    if (mon.adc != adc_taken) begin failures++; $display("FAIL adc tap %0d != %0d", mon.adc, adc_taken); end
  end

  // update rate and per-update bookkeeping
  always @(negedge clk) if (ctrl_update) begin
    updates++;
    n_dec++;
    n_cordic++;
    if (t_prev >= 0) begin
      checks++;
      if (cyc - t_prev != 100) begin failures++; $display("FAIL update spacing %0d", cyc - t_prev); end
    end
    t_prev = cyc;
    if (mon.pi_sat) n_sat++;
  end

  task automatic wait_updates(input int k);
    int u0 = updates;
    wait (updates >= u0 + k);
    @(negedge clk);
  endtask

  task automatic set_rot(input real a);
    cfg.rot_cos = lo_t'(int'($floor(131071.0 * $cos(a) + 0.5)));
    cfg.rot_sin = lo_t'(int'($floor(131071.0 * $sin(a) + 0.5)));
  endtask

  task automatic check_phase(input real exp_rad, input real tol_lsb, input string what);
    real d;
    d = wrap(real'(mon.phase) * LSB - exp_rad) / LSB;
    checks++;
    if (rabs(d) > tol_lsb) begin
      failures++; $display("FAIL %s: phase %0d, expected %f rad (%f LSB off)", what, mon.phase, exp_rad, d);
    end
  endtask

  task automatic check_lock(input string what, input int tol);
    int worst = 0;
    for (int k = 0; k < 50; k++) begin
      wait_updates(1);
      if (int'(mon.error) > worst) worst = int'(mon.error);
      if (-int'(mon.error) > worst) worst = -int'(mon.error);
    end
    checks++;
    if (worst > tol) begin failures++; $display("FAIL %s: not locked, worst error %0d LSB", what, worst); end
    else n_lock++;
    $display("%s: worst error over 50 updates %0d LSB", what, worst);
  endtask

  real ea, steady;
  initial begin
    adc = 0;
    cfg = '0;
    set_rot(0.0);
    cfg.iir_bypass = 1'b1;
    cfg.iir_coef.b0 = q216(1.0);
    cfg.ff_offset = 17'sd1000;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1: open loop, detector: measured phase = -phi
    wait_updates(4);
    check_phase(-phi, 8.0, "open loop");
    ea = 5.0 * A * 131071.0 / 262144.0;
    checks++;
    if (rabs(real'(mon.ampl) - ea) > 8.0) begin failures++; $display("FAIL ampl %0d exp %f", mon.ampl, ea); end
    checks++;
    if (dac != dac_t'(1000)) begin failures++; $display("FAIL dac %0d != offset", dac); end
    else n_ff++;
    n_bypass++;

    // 2: rotator
    set_rot(0.5);
    wait_updates(3);
    check_phase(-phi + 0.5, 8.0, "rotated");
    n_rot++;
    set_rot(0.0);

    // 3: close the loop, with a frequency drift the integrator must absorb
    cfg.ff_offset = 17'sd0;
    cfg.kp = 16'sd16384;
    cfg.ki = 16'sd2000;
    drift = 20.0 * LSB / 100.0;
    loop_closed = 1;
    wait_updates(300);
    check_lock("bypass", 30);
    steady = drift / G;
    checks++;
    if (rabs(real'(dac) - steady) > 3.0) begin failures++; $display("FAIL steady dac %0d exp %f", dac, steady); end

    // 4: set-point step of 0.05 rad
    cfg.setpoint = phase_t'(int'(0.05 / LSB));
    n_setpt++;
    wait_updates(300);
    check_lock("set-point", 30);
    checks++;
    if (rabs(real'(mon.phase_filt) - 0.05 / LSB) > 30.0) begin
      failures++; $display("FAIL set-point not followed: %0d", mon.phase_filt);
    end

    // 5a: notch at 50 kHz (phase rate 124.91e6/100), pole radius 0.95
    begin
      real w0 = 2.0 * PI * 50.0e3 / 1.2491e6;
      cfg.iir_coef.b0 = q216(1.0);
      cfg.iir_coef.b1 = q216(-2.0 * $cos(w0));
      cfg.iir_coef.b2 = q216(1.0);
      cfg.iir_coef.a1 = q216(-2.0 * 0.95 * $cos(w0));
      cfg.iir_coef.a2 = q216(0.95 * 0.95);
    end
    wait_updates(20);
    cfg.iir_bypass = 1'b0;
    n_notch++;
    // a 50 kHz phase oscillation (piezo resonance) appears on the laser; the
    // notch must keep it out of the loop
    pm_amp = 0.01;
    wait_updates(200);
    begin
      int raw_max = 0, filt_max = 0, p0, f0;
      p0 = int'(mon.phase); f0 = int'(mon.phase_filt);
      for (int k = 0; k < 100; k++) begin
        wait_updates(1);
        if (int'(mon.phase) - p0 > raw_max) raw_max = int'(mon.phase) - p0;
        if (p0 - int'(mon.phase) > raw_max) raw_max = p0 - int'(mon.phase);
        if (int'(mon.phase_filt) - f0 > filt_max) filt_max = int'(mon.phase_filt) - f0;
        if (f0 - int'(mon.phase_filt) > filt_max) filt_max = f0 - int'(mon.phase_filt);
      end
      $display("50 kHz oscillation: raw phase swing %0d LSB, after notch %0d LSB", raw_max, filt_max);
      checks++;
      if (raw_max < 400 || filt_max * 5 > raw_max) begin
        failures++; $display("FAIL notch did not suppress the 50 kHz oscillation");
      end else n_res++;
    end
    check_lock("notch", 40);
    pm_amp = 0.0;

    // 5b: first-order low-pass, pole 0.5
    cfg.iir_bypass = 1'b1;
    cfg.iir_coef.b0 = q216(0.5);
    cfg.iir_coef.b1 = '0;
    cfg.iir_coef.b2 = '0;
    cfg.iir_coef.a1 = q216(-0.5);
    cfg.iir_coef.a2 = '0;
    wait_updates(20);
    cfg.iir_bypass = 1'b0;
    n_lp++;
    wait_updates(300);
    check_lock("low-pass", 40);

    // 6: open the loop with a large error and high gains: integrator clips
    loop_closed = 0;
    cfg.iir_bypass = 1'b1;
    phi = -1.5;
    cfg.setpoint = '0;
    cfg.kp = 16'sd32767;
    cfg.ki = 16'sd100;
    wait_updates(60);

    checks++;
    if (n_dec == 0 || n_cordic == 0 || n_rot == 0 || n_bypass == 0 || n_notch == 0 || n_lp == 0
        || n_setpt == 0 || n_sat == 0 || n_lock == 0 || n_ff == 0 || n_res == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: decimated=%0d cordic=%0d rotation=%0d bypass=%0d notch=%0d lowpass=%0d setpoint=%0d integrator_clip=%0d locked=%0d feedforward=%0d resonance_suppressed=%0d",
             n_dec, n_cordic, n_rot, n_bypass, n_notch, n_lp, n_setpt, n_sat, n_lock, n_ff, n_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
