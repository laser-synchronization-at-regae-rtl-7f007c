// moving_avg: moving-average (boxcar) filter over LEN samples, LEN = 5 as in
// the firmware block diagram. With the IF at exactly fs/5, a 5-sample sum
// removes the 2*fIF mixing product completely and keeps the baseband term.
// Implementation: a LEN-deep shift register and a running sum that adds the
// newest sample and subtracts the one leaving the window (an accumulator
// with a comb, as the diagram's delay line with an adder suggests). The
// output is the plain sum (gain LEN, no division); scaling happens in the
// decimator. Output registered one cycle after in_valid.
module moving_avg #(
  parameter int unsigned LEN  = 5,
  parameter int unsigned IN_W = 34,
  parameter int unsigned OUT_W = IN_W + $clog2(LEN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);

  logic signed [IN_W-1:0] win [LEN];
  logic signed [OUT_W-1:0] sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(LEN); k++) win[k] <= '0;
      sum       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win[0] <= x;
        for (int k = 1; k < int'(LEN); k++) win[k] <= win[k-1];
        sum <= sum + OUT_W'(x) - OUT_W'(win[LEN-1]);
      end
    end
  end

  assign y = sum;

endmodule
