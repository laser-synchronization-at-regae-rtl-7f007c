// ff_offset_adder: adds the user-defined feed-forward offset, which sets the
// coarse piezo position, to the 17-bit PI controller output and produces the
// 18-bit DAC word (widths as printed in the firmware block diagram: 17 in,
// 18 out). Two 17-bit signed values always fit in 18 bits, so no saturation
// is needed. The DAC runs at 125 MS/s and simply holds the registered word
// between controller updates; the offset is applied at once, even between
// updates, so the host can move the piezo with the loop open.
module ff_offset_adder
  import lsync_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  ctrl_t offset,
  output dac_t  dac
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac <= '0;
    else        dac <= DAC_W'(ctrl) + DAC_W'(offset);
  end

endmodule
