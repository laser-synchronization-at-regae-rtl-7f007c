// tb_pi_controller: drives random errors and gains and compares the output
// with a model of the series PI law kept in the testbench:
//   p = (e*Kp) >> 9,  acc = clip25(acc + p),  u = clip17((p >> 8) + ((acc >> 8)*Ki >> 16))
// Also checks the two-clock latency of out_valid, that a constant error with
// Ki = 0 gives a constant proportional output, that with Ki > 0 the output
// keeps growing (integral action), and that the integrator clips and raises
// int_sat rather than wrapping.
module tb_pi_controller;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, int_sat;
  phase_t err;
  gain_t kp, ki;
  ctrl_t u, imon;
  int checks = 0, failures = 0, sat_seen = 0;
  longint macc, mp, mu, sum;
  bit msat;

  pi_controller dut (.clk, .rst_n, .in_valid, .err, .kp, .ki, .out_valid, .u, .int_mon(imon), .int_sat);

  always #4 clk = ~clk;

  initial begin
    #4000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update(input int e);
    @(negedge clk);
    err = phase_t'(e);
    in_valid = 1;
    mp = (longint'(err) * longint'(kp)) >>> 9;
    sum = macc + mp;
    msat = (sum > 16777215 || sum < -16777216);
    macc = sum > 16777215 ? 16777215 : (sum < -16777216 ? -16777216 : sum);
    mu = (mp >>> 8) + (((macc >>> 8) * longint'(ki)) >>> 16);
    if (mu > 65535) mu = 65535;
    if (mu < -65536) mu = -65536;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid || int_sat != msat) begin
      failures++; $display("FAIL early valid or sat flag (%0b/%0b)", int_sat, msat);
    end
    if (int_sat) sat_seen++;
    @(negedge clk);
    checks++;
    if (!out_valid || longint'(u) != mu || longint'(imon) != (macc >>> 8)) begin
      failures++; $display("FAIL e=%0d kp=%0d ki=%0d u=%0d exp=%0d imon=%0d", err, kp, ki, u, mu, imon);
    end
    @(negedge clk);
  endtask

  ctrl_t u_prev;
  initial begin
    err = 0; kp = 0; ki = 0; macc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // proportional only
    kp = 16'sd20000; ki = 0;
    for (int n = 0; n < 20; n++) begin
      update(1000);
      checks++;
      if (u != ctrl_t'(((1000 * 20000) >>> 9) >>> 8)) begin failures++; $display("FAIL P-only u=%0d", u); end
    end
    // integral action: output grows with constant error
    ki = 16'sd3000;
    u_prev = u;
    for (int n = 0; n < 20; n++) begin
      update(1000);
      checks++;
      if (u <= u_prev) begin failures++; $display("FAIL no integral growth %0d <= %0d", u, u_prev); end
      u_prev = u;
    end
    // random
    for (int n = 0; n < 400; n++) begin
      kp = gain_t'($urandom); ki = gain_t'($urandom);
      update($urandom_range(0, 262143) - 131072);
    end
    // drive the integrator into its clip
    kp = 16'sd32767; ki = 16'sd100;
    for (int n = 0; n < 20; n++) update(131071);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL integrator never clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
