// cordic: amplitude and phase of the (rotated) I/Q pair by the CORDIC
// algorithm in vectoring mode, with ITER = 17 micro-rotations as printed in
// the firmware block diagram ("CORDIC (itr = 17)"); 18-bit A and P outputs.
// How it works: a vector in the left half-plane is first turned by pi (the
// angle register starts at pi). Then each iteration k rotates the vector by
// +/- atan(2^-k) towards the x axis using only shifts and adds, and
// accumulates the rotation angle. At the end x holds the magnitude times the
// CORDIC gain 1.6468, which is removed by one multiplication with
// round(2^17 * 0.607253) = 79594.
// Angle table, in units of pi/2^19:  atan_tab[k] = round(2^19 atan(2^-k)/pi).
// Formats (this design's choice): phase is signed, 2^17 LSB = pi, so it wraps
// naturally at +/-pi; amplitude is unsigned, same LSB as the I/Q input.
// Datapath keeps 2 extra fractional bits on x/y and on the angle.
// Timing: iterative, one micro-rotation per clock. in_valid is accepted when
// busy is low; out_valid pulses on the ITER+1-th clock edge after the edge
// that took in_valid (18 clocks). At 1.25 MS/s input rate
// (one pair per 100 clocks) the unit is idle most of the time.
module cordic
  import lsync_pkg::*;
#(
  parameter int unsigned ITER = CORDIC_ITER
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  iq_t    iq,
  output logic   busy,
  output logic   out_valid,
  output ampl_t  ampl,
  output phase_t phase
);

  localparam int unsigned GF = 2;               // guard fraction bits
  localparam int unsigned XW = IQ_W + 3 + GF;   // 23: sign, gain, sqrt2
  localparam int unsigned ZW = PH_W + GF;       // 20: 2^19 = pi

  function automatic logic [ZW-1:0] atan_tab(input int k);
    case (k)
      0:  return ZW'(131072);
      1:  return ZW'(77376);
      2:  return ZW'(40884);
      3:  return ZW'(20753);
      4:  return ZW'(10417);
      5:  return ZW'(5213);
      6:  return ZW'(2607);
      7:  return ZW'(1304);
      8:  return ZW'(652);
      9:  return ZW'(326);
      10: return ZW'(163);
      11: return ZW'(81);
      12: return ZW'(41);
      13: return ZW'(20);
      14: return ZW'(10);
      15: return ZW'(5);
      16: return ZW'(3);
      17: return ZW'(1);
      default: return ZW'(0);
    endcase
  endfunction

  localparam logic signed [17:0] INV_GAIN = 18'sd79594;

  logic signed [XW-1:0] x, y;
  logic        [ZW-1:0] z;
  logic [4:0]  k;
  logic        run;

  logic signed [XW-1:0] xs, ys;
  assign xs = x >>> k;
  assign ys = y >>> k;

  logic signed [XW-1:0] xin, yin;
  assign xin = XW'(iq.i) <<< GF;
  assign yin = XW'(iq.q) <<< GF;

  // gain correction and output formatting (the two guard bits of z_rnd are
  // dropped after rounding)
  logic signed [XW+18-1:0] xg;
  logic signed [63:0]      a_full;
  logic        [ZW-1:0]    z_rnd;
  assign xg     = x * INV_GAIN;
  assign a_full = 64'(xg >>> (17 + GF));
  assign z_rnd  = z + ZW'(1 << (GF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; k <= '0;
      run <= 1'b0;
      out_valid <= 1'b0;
      ampl  <= '0;
      phase <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!run) begin
        if (in_valid) begin
          if (iq.i < 0) begin
            x <= -xin; y <= -yin; z <= ZW'(1) << (ZW - 1);   // start at pi
          end else begin
            x <= xin;  y <= yin;  z <= '0;
          end
          k   <= '0;
          run <= 1'b1;
        end
      end else if (k < 5'(ITER)) begin
        if (y >= 0) begin
          x <= x + ys;  y <= y - xs;  z <= z + atan_tab(int'(k));
        end else begin
          x <= x - ys;  y <= y + xs;  z <= z - atan_tab(int'(k));
        end
        k <= k + 5'd1;
      end else begin
        run       <= 1'b0;
        out_valid <= 1'b1;
        ampl      <= (a_full > 64'sd262143) ? '1 : (a_full < 0 ? '0 : PH_W'(a_full));
        phase     <= phase_t'(z_rnd[ZW-1:GF]);
      end
    end
  end

  assign busy = run;

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && run))
    else $error("cordic: input while busy");

endmodule
