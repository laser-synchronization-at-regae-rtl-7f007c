// tb_iq_mixer: random ADC samples and LO words; the registered products are
// compared with products the testbench computes in 64-bit integers.
module tb_iq_mixer;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  adc_t x;
  lo_t  lc, ls;
  logic signed [33:0] ip, qp;
  longint exp_i, exp_q;
  int checks = 0, failures = 0;

  iq_mixer dut (.clk, .rst_n, .in_valid, .x, .lo_cos(lc), .lo_sin(ls),
                .out_valid, .i_prod(ip), .q_prod(qp));

  always #4 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; lc = 0; ls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      x  = adc_t'($urandom);
      lc = lo_t'($urandom);
      ls = lo_t'($urandom);
      if (n < 4) begin x = (n[0]) ? 16'sh8000 : 16'sh7fff; lc = (n[1]) ? 18'sh20000 : 18'sh1ffff; ls = lc; end
      in_valid = 1;
      exp_i = longint'(x) * longint'(lc);
      exp_q = longint'(x) * longint'(ls);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(ip) != exp_i || longint'(qp) != exp_q) begin
        failures++;
        $display("FAIL n=%0d i=%0d/%0d q=%0d/%0d v=%0b", n, ip, exp_i, qp, exp_q, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
