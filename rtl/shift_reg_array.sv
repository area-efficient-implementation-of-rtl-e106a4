// shift_reg_array: one row of the polyphase input data memory.
//
// L complex registers are cascaded; when shift_en is high the new sample
// enters taps[0] and every other register takes the value of its neighbour,
// so taps[i] holds the i-th most recent sample loaded into this row. The taps
// are visible combinationally; a shift takes effect at the next clock edge.
// Row length (10 for WLAN, 11 for UMTS) follows the document; the synchronous
// active-low reset to zero is this design's choice.
module shift_reg_array
  import chan_pkg::*;
#(
  parameter int L = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   shift_en,
  input  cdata_t din,
  output cdata_t taps [L]
);

  cdata_t regs [L];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) regs[i] <= '0;
    end else if (shift_en) begin
      regs[0] <= din;
      for (int i = 1; i < L; i++) regs[i] <= regs[i-1];
    end
  end

  assign taps = regs;

endmodule
