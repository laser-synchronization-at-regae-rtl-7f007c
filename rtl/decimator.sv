// decimator: keeps one I/Q pair out of every FACTOR = 100 (firmware block
// diagram and text: "decimating the data by 100"), reducing the 125 MS/s
// stream to about 1.25 MS/s for the phase-processing stages. The kept wide
// sums are shifted right by SHIFT bits and saturated to the 18-bit I/Q words
// of the diagram; SHIFT = 17 is this design's scaling (a full-scale 16-bit IF
// gives at most about 0.63 of the 18-bit range). out_valid pulses for one
// cycle, one cycle after the in_valid that completes each group of FACTOR.
module decimator
  import lsync_pkg::*;
#(
  parameter int unsigned FACTOR = DEC,
  parameter int unsigned IN_W   = 37,
  parameter int unsigned OUT_W  = IQ_W,
  parameter int unsigned SHIFT  = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);

  localparam int unsigned CW = $clog2(FACTOR + 1);
  logic [CW-1:0] cnt;

  function automatic logic signed [OUT_W-1:0] scale(input logic signed [IN_W-1:0] v);
    logic signed [63:0] s;
    s = 64'(v >>> SHIFT);
    return OUT_W'(sat(s, OUT_W));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(FACTOR - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          i_out     <= scale(i_in);
          q_out     <= scale(q_in);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
