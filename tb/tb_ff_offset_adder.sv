// tb_ff_offset_adder: random and extreme controller outputs and offsets; the
// DAC word one clock later must be their exact 18-bit sum.
module tb_ff_offset_adder;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t c, o;
  dac_t dac;
  int checks = 0, failures = 0;
  int e;

  ff_offset_adder dut (.clk, .rst_n, .ctrl(c), .offset(o), .dac);

  always #4 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = 0; o = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      c = ctrl_t'($urandom); o = ctrl_t'($urandom);
      if (n == 0) begin c = 17'sd65535; o = 17'sd65535; end
      if (n == 1) begin c = -17'sd65536; o = -17'sd65536; end
      e = int'(c) + int'(o);
      @(negedge clk);
      checks++;
      if (int'(dac) != e) begin failures++; $display("FAIL c=%0d o=%0d dac=%0d", c, o, dac); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
