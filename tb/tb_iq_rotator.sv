// tb_iq_rotator: random I/Q vectors rotated by random angles; the result is
// compared with the rotation done in real arithmetic (tolerance 3 LSB for the
// quantised cos/sin words), and a vector whose rotated length exceeds the
// 18-bit range must saturate instead of wrapping.
module tb_iq_rotator;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  iq_t iq_in, iq_out;
  lo_t rc, rs;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  real a, ei, eq;

  iq_rotator dut (.clk, .rst_n, .in_valid, .iq_in, .rot_cos(rc), .rot_sin(rs), .out_valid, .iq_out);

  always #4 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  function automatic real clip(real v);
    if (v > 131071.0) return 131071.0;
    if (v < -131072.0) return -131072.0;
    return v;
  endfunction

  initial begin
    iq_in = '0; rc = 0; rs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
      if (n == 0) a = PI / 4.0;
      rc = lo_t'(int'($floor(131071.0 * $cos(a) + 0.5)));
      rs = lo_t'(int'($floor(131071.0 * $sin(a) + 0.5)));
      iq_in.i = iq_word_t'($urandom_range(0, 180000) - 90000);
      iq_in.q = iq_word_t'($urandom_range(0, 180000) - 90000);
      if (n == 0) begin iq_in.i = 18'sd131071; iq_in.q = 18'sd131071; end
      in_valid = 1;
      ei = clip(real'(iq_in.i) * $cos(a) - real'(iq_in.q) * $sin(a));
      eq = clip(real'(iq_in.i) * $sin(a) + real'(iq_in.q) * $cos(a));
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || rabs(real'(iq_out.i) - ei) > 3.0 || rabs(real'(iq_out.q) - eq) > 3.0) begin
        failures++;
        $display("FAIL n=%0d a=%f out=(%0d,%0d) exp=(%f,%f)", n, a, iq_out.i, iq_out.q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
