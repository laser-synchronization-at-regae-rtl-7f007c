// tb_iir_filter: the biquad is checked sample by sample against a
// difference-equation model kept in the testbench (64-bit integers, same
// Q2.16 scaling, truncation and 18-bit saturation), in three set-ups:
//  - notch at 50 kHz for a 1.2491 MS/s phase rate (pole radius 0.95): a
//    50 kHz tone must be suppressed to below 3 % of its amplitude;
//  - first-order low-pass (pole 0.9): a step must settle to its input value;
//  - bypass: the output must equal the input sample.
module tb_iir_filter;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, bypass = 0, out_valid;
  phase_t x, y, yf;
  biquad_coef_t coef;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real FS = 1.2491e6;
  longint mx1, mx2, my1, my2, acc, ym;
  int peak;

  iir_filter dut (.clk, .rst_n, .in_valid, .x, .coef, .bypass, .out_valid, .y_filt(yf), .y);

  always #4 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coef_t q216(real v);
    return coef_t'(int'($floor(v * 65536.0 + 0.5)));
  endfunction

  task automatic model_reset();
    mx1 = 0; mx2 = 0; my1 = 0; my2 = 0;
  endtask

  // one sample through DUT and model, compare
  task automatic step(input int xv, input bit cmp_model);
    longint xl;
    @(negedge clk);
    x = phase_t'(xv);
    in_valid = 1;
    xl = longint'(x);
    acc = xl * longint'(coef.b0) + mx1 * longint'(coef.b1) + mx2 * longint'(coef.b2)
        - my1 * longint'(coef.a1) - my2 * longint'(coef.a2);
    ym = acc >>> 16;
    if (ym > 131071) ym = 131071;
    if (ym < -131072) ym = -131072;
    mx2 = mx1; mx1 = xl; my2 = my1; my1 = ym;
    @(negedge clk);
    in_valid = 0;
    if (cmp_model) begin
      checks++;
      if (!out_valid || longint'(yf) != ym || longint'(y) != (bypass ? xl : ym)) begin
        failures++;
        $display("FAIL x=%0d yf=%0d y=%0d model=%0d bypass=%0b", x, yf, y, ym, bypass);
      end
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model_reset();
  endtask

  real w0;
  initial begin
    x = 0;
    // notch
    w0 = 2.0 * PI * 50.0e3 / FS;
    coef.b0 = q216(1.0);
    coef.b1 = q216(-2.0 * $cos(w0));
    coef.b2 = q216(1.0);
    coef.a1 = q216(-2.0 * 0.95 * $cos(w0));
    coef.a2 = q216(0.95 * 0.95);
    do_reset();
    peak = 0;
    for (int n = 0; n < 600; n++) begin
      step(int'($floor(40000.0 * $sin(w0 * n) + 0.5)), 1'b1);
      if (n >= 300 && (int'(yf) > peak)) peak = int'(yf);
    end
    checks++;
    if (peak > 1200) begin failures++; $display("FAIL notch peak %0d", peak); end
    // low-pass
    coef.b0 = q216(0.1);
    coef.b1 = '0;
    coef.b2 = '0;
    coef.a1 = q216(-0.9);
    coef.a2 = '0;
    do_reset();
    for (int n = 0; n < 200; n++) step(50000, 1'b1);
    checks++;
    if (int'(yf) < 49800 || int'(yf) > 50200) begin failures++; $display("FAIL lp settle %0d", yf); end
    // bypass, random data, with a notch set
    bypass = 1;
    coef.b0 = q216(0.5); coef.b1 = q216(0.25); coef.b2 = q216(-0.125);
    coef.a1 = q216(-0.5); coef.a2 = q216(0.25);
    for (int n = 0; n < 200; n++) step($urandom_range(0, 262143) - 131072, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
