// tb_moving_avg: random samples with gaps in in_valid; each output is
// compared with the sum of the last 5 accepted samples kept in a testbench
// history. A second part checks that the 5-sample sum cancels a tone at
// 2/5 of the sample rate (the 2*fIF mixing product).
module tb_moving_avg;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [33:0] x;
  logic signed [36:0] y;
  longint hist [$];
  longint exp_sum;
  int checks = 0, failures = 0, ns = 0;
  localparam real PI = 3.14159265358979;

  moving_avg #(.LEN(5), .IN_W(34)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #4 clk = ~clk;

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0;
    for (int k = 0; k < 5; k++) hist.push_back(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n < 200) x = 34'($signed({$urandom, $urandom}));
      in_valid = ($urandom_range(0, 3) != 0);
      if (n >= 200) begin
        // tone at 2/5 of the sample rate, indexed by accepted sample
        x = 34'(longint'($floor(8.0e9 * $cos(2.0 * PI * 2.0 * ns / 5.0 + 0.3) + 0.5)));
        if (in_valid) ns++;
      end
      if (in_valid) begin
        hist.push_back(longint'(x));
        void'(hist.pop_front());
      end
      @(negedge clk);
      if (in_valid) begin
        exp_sum = 0;
        foreach (hist[k]) exp_sum += hist[k];
        checks++;
        if (!out_valid || longint'(y) != exp_sum) begin
          failures++;
          $display("FAIL n=%0d y=%0d exp=%0d", n, y, exp_sum);
        end
        if (n >= 220) begin
          checks++;
          if (y > 37'sd8 || y < -37'sd8) begin
            failures++;
            $display("FAIL tone not cancelled n=%0d y=%0d", n, y);
          end
        end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL spurious valid"); end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
