// tb_quad_detector: drives an ideal IF tone x[n] = A cos(2 pi n/5 + phi)
// (16-bit, one sample per clock) and checks the decimated I/Q against the
// closed-form result I = 5 A L cos(phi) / 2^18, Q = -5 A L sin(phi) / 2^18
// (L = 2^17-1), the recovered phase, and one output every 100 clocks.
// The phase phi steps to a new value every few outputs; the first output
// after a step straddles the step and is not compared.
module tb_quad_detector;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, adc_valid = 0, out_valid;
  adc_t adc;
  iq_t  iq;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real A  = 30000.0;
  real phi = 0.4;
  longint cyc = 0, t_prev = -1;
  int outs = 0, skip = 2;
  longint n = 0;

  quad_detector dut (.clk, .rst_n, .adc_valid, .adc, .out_valid, .iq);

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC source, one sample per clock
  always @(posedge clk) if (rst_n) begin
    #1;
    adc_valid <= 1'b1;
    adc <= adc_t'(int'($floor(A * $cos(2.0 * PI * real'(n % 5) / 5.0 + phi) + 0.5)));
    n++;
  end

  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  real ei, eq, ph, dph;
  always @(negedge clk) if (out_valid) begin
    outs++;
    if (t_prev >= 0) begin
      checks++;
      if (cyc - t_prev != 100) begin failures++; $display("FAIL spacing %0d", cyc - t_prev); end
    end
    t_prev = cyc;
    if (skip > 0) skip--;
    else begin
      ei = 5.0 * A * 131071.0 * $cos(phi) / 262144.0;
      eq = -5.0 * A * 131071.0 * $sin(phi) / 262144.0;
      ph = $atan2(-real'(iq.q), real'(iq.i));
      dph = ph - phi;
      if (dph > PI) dph -= 2.0 * PI;
      if (dph < -PI) dph += 2.0 * PI;
      checks++;
      if (rabs(real'(iq.i) - ei) > 4.0 || rabs(real'(iq.q) - eq) > 4.0 || rabs(dph) > 1.0e-4) begin
        failures++;
        $display("FAIL phi=%f i=%0d (%f) q=%0d (%f) ph=%f", phi, iq.i, ei, iq.q, eq, ph);
      end
    end
    if (outs % 4 == 0) begin
      phi = phi + 1.1;
      if (phi > PI) phi -= 2.0 * PI;
      skip = 1;
    end
  end

  initial begin
    adc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (outs == 41);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
