// lo_lut: local-oscillator table for the digital quadrature detector.
// The IF (about 25 MHz) is sampled at about 125 MHz, so one IF period is
// exactly LUT_LEN = 5 samples. A wrapping address pointer steps through a
// 5-entry table of cos and sin words once per sample; the words multiply the
// ADC samples in iq_mixer. Table size, word width (18 bits) and the sawtooth
// address pointer follow the firmware block diagram; the amplitude scaling
// (full scale 2^17-1) and reset to address 0 are this design's choice.
// Table entries: cos_tab[k] = round((2^17-1) cos(2 pi k/5)),
//                sin_tab[k] = round((2^17-1) sin(2 pi k/5)).
// Timing: when en is high the pointer advances; cos_o/sin_o are registered
// and belong to address 'addr_o' (one word per enabled cycle).
module lo_lut
  import lsync_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output lo_t  cos_o,
  output lo_t  sin_o,
  output logic [2:0] addr_o
);

  localparam int unsigned N = LUT_LEN;

  function automatic lo_t cos_tab(input logic [2:0] k);
    case (k)
      3'd0:    return 18'sd131071;
      3'd1:    return 18'sd40503;
      3'd2:    return -18'sd106039;
      3'd3:    return -18'sd106039;
      default: return 18'sd40503;
    endcase
  endfunction

  function automatic lo_t sin_tab(input logic [2:0] k);
    case (k)
      3'd0:    return 18'sd0;
      3'd1:    return 18'sd124656;
      3'd2:    return 18'sd77042;
      3'd3:    return -18'sd77042;
      default: return -18'sd124656;
    endcase
  endfunction

  logic [2:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      cos_o <= cos_tab(3'd0);
      sin_o <= sin_tab(3'd0);
    end else if (en) begin
      addr  <= (addr == 3'(N - 1)) ? '0 : addr + 3'd1;
      cos_o <= cos_tab(addr);
      sin_o <= sin_tab(addr);
    end
  end

  // address of the word currently on cos_o/sin_o
  logic [2:0] addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  addr_q <= '0;
    else if (en) addr_q <= addr;
  end
  assign addr_o = addr_q;

endmodule
