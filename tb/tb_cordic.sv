// tb_cordic: random I/Q vectors in all four quadrants plus the axes; the
// amplitude is compared with sqrt(I^2+Q^2) and the phase with atan2(Q, I)
// (phase LSB = pi/2^17, compared modulo 2 pi). Also checks the latency:
// out_valid rises on the 18th (ITER+1) clock edge after the edge that took
// in_valid; counted from the falling edge after that one, lat = 19.
module tb_cordic;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, busy, out_valid;
  iq_t iq;
  ampl_t ampl;
  phase_t phase;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  real ea, ep, dp, mag;
  int lat;

  cordic dut (.clk, .rst_n, .in_valid, .iq, .busy, .out_valid, .ampl, .phase);

  always #4 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    iq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      case (n)
        0: begin iq.i = 18'sd100000;  iq.q = 18'sd0; end
        1: begin iq.i = -18'sd100000; iq.q = 18'sd0; end
        2: begin iq.i = 18'sd0;       iq.q = 18'sd100000; end
        3: begin iq.i = 18'sd0;       iq.q = -18'sd100000; end
        4: begin iq.i = -18'sd131072; iq.q = -18'sd131072; end
        5: begin iq.i = 18'sd131071;  iq.q = 18'sd131071; end
        6: begin iq.i = -18'sd90000;  iq.q = 18'sd1; end
        default: begin
          iq.i = iq_word_t'($urandom_range(0, 262143));
          iq.q = iq_word_t'($urandom_range(0, 262143));
        end
      endcase
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
      mag = $sqrt(real'(iq.i) * real'(iq.i) + real'(iq.q) * real'(iq.q));
      ea = mag;
      ep = $atan2(real'(iq.q), real'(iq.i)) * 131072.0 / PI;
      dp = real'(phase) - ep;
      if (dp > 131072.0) dp -= 262144.0;
      if (dp < -131072.0) dp += 262144.0;
      checks++;
      if (lat != 19 || rabs(real'(ampl) - ea) > 3.0 || (mag > 1000.0 && rabs(dp) > 3.0)) begin
        failures++;
        $display("FAIL n=%0d iq=(%0d,%0d) a=%0d (%f) p=%0d (%f) lat=%0d",
                 n, iq.i, iq.q, ampl, ea, phase, ep, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
