// tb_phase_error: random set-points and phases; the error must equal
// set-point minus phase taken modulo 2 pi (2^18 LSB), i.e. the value in
// [-2^17, 2^17) congruent to the difference.
module tb_phase_error;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  phase_t ph, sp, err;
  int checks = 0, failures = 0;
  longint d;

  phase_error dut (.clk, .rst_n, .in_valid, .phase(ph), .setpoint(sp), .out_valid, .err);

  always #4 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ph = 0; sp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ph = phase_t'($urandom); sp = phase_t'($urandom);
      if (n == 0) begin sp = 18'sd131000; ph = -18'sd131000; end
      if (n == 1) begin sp = 18'sd0; ph = 18'sd1234; end
      in_valid = 1;
      d = longint'(sp) - longint'(ph);
      while (d >= 131072) d -= 262144;
      while (d < -131072) d += 262144;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(err) != d) begin
        failures++; $display("FAIL sp=%0d ph=%0d err=%0d exp=%0d", sp, ph, err, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
