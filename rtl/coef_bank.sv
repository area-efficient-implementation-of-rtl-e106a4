// coef_bank: filter coefficient bank of the serial polyphase channelizer.
//
// Holds NSETS coefficient sets of L real Q0.11 coefficients in registers.
// Set k holds taps h[k + NSETS*i], i = 0..L-1, of the prototype filter. A
// whole set is read combinationally per cycle (rd_set); coefficients are
// written one at a time at address set*L + tap and take effect on the next
// cycle. Register storage follows the document; the write port and the
// clear-on-reset are this design's choices, since no coefficient values are
// given.
module coef_bank
  import chan_pkg::*;
#(
  parameter int NSETS = 6,
  parameter int L     = 10,
  localparam int AW   = $clog2(NSETS * L),
  localparam int SW   = (NSETS > 1) ? $clog2(NSETS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  coef_t         coef_data,
  input  logic [SW-1:0] rd_set,
  output coef_t         rd_coefs [L]
);

  coef_t mem [NSETS*L];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NSETS*L; i++) mem[i] <= '0;
    end else if (coef_we && (int'(coef_addr) < NSETS*L)) begin
      mem[coef_addr] <= coef_data;
    end
  end

  always_comb begin
    for (int t = 0; t < L; t++) rd_coefs[t] = mem[int'(rd_set) * L + t];
  end

endmodule
