// tb_decimator: feeds a counting ramp and random gaps; checks that exactly
// one output appears per 100 accepted inputs, that it is the 100th input
// shifted right by 17 and saturated to 18 bits, and the spacing in clocks
// when in_valid is high every clock.
module tb_decimator;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [36:0] ii, qi;
  logic signed [17:0] io, qo;
  int checks = 0, failures = 0;
  int accepted = 0, outputs = 0;
  longint last_i, last_q, ei, eq;
  longint t_prev = -1, cyc = 0, cont_start = 1 << 40;

  decimator #(.FACTOR(100), .IN_W(37), .OUT_W(18), .SHIFT(17)) dut (
    .clk, .rst_n, .in_valid, .i_in(ii), .q_in(qi), .out_valid, .i_out(io), .q_out(qo));

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;
  // what the decimator samples at this edge
  always @(posedge clk) if (rst_n && in_valid) begin
    accepted++; last_i = longint'(ii); last_q = longint'(qi);
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint satq(longint v);
    longint s = v >>> 17;
    if (s > 131071) return 131071;
    if (s < -131072) return -131072;
    return s;
  endfunction

  // output monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    outputs++;
    checks++;
    ei = satq(last_i); eq = satq(last_q);
    if (longint'(io) != ei || longint'(qo) != eq || accepted != outputs * 100) begin
      failures++;
      $display("FAIL out %0d i=%0d/%0d q=%0d/%0d acc=%0d", outputs, io, ei, qo, eq, accepted);
    end
    if (t_prev >= cont_start) begin
      checks++;
      if (cyc - t_prev != 100) begin
        failures++; $display("FAIL spacing %0d", cyc - t_prev);
      end
    end
    t_prev = cyc;
  end

  initial begin
    ii = 0; qi = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #1;
      in_valid = (n >= 1500) ? 1'b1 : ($urandom_range(0, 2) != 0);
      if (n == 1500) cont_start = cyc;
      ii = 37'($signed({$urandom, $urandom}) >>> ($urandom_range(0, 8)));
      qi = 37'(-(longint'(n) << 10));
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (outputs != accepted / 100) begin
      failures++; $display("FAIL outputs=%0d accepted=%0d", outputs, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
