// tb_lo_lut: checks the LO table against cos/sin computed with real
// arithmetic, the wrap of the address pointer after 5 samples and that the
// pointer holds when en is low.
module tb_lo_lut;
  import lsync_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  lo_t  c, s;
  logic [2:0] a;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  lo_lut dut (.clk, .rst_n, .en, .cos_o(c), .sin_o(s), .addr_o(a));

  always #4 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input int k);
    int ec, es;
    ec = int'($floor(131071.0 * $cos(2.0 * PI * k / 5.0) + 0.5));
    es = int'($floor(131071.0 * $sin(2.0 * PI * k / 5.0) + 0.5));
    checks++;
    if (int'(c) - ec > 1 || ec - int'(c) > 1 || int'(s) - es > 1 || es - int'(s) > 1
        || int'(a) != k) begin
      failures++;
      $display("FAIL k=%0d cos=%0d (%0d) sin=%0d (%0d) addr=%0d", k, c, ec, s, es, a);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) en = 1;
    for (int n = 0; n < 23; n++) begin
      @(negedge clk);
      check_word(n % 5);
      if (n == 11) begin
        en = 0;
        repeat (4) begin @(negedge clk); check_word(n % 5); end
        en = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
