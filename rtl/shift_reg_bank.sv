// shift_reg_bank: polyphase input memory of M rows with an L-wide read port.
//
// The input sample is offered to all M shift-register arrays; a one-hot row
// decoder enables the shift of the row named by load_row only. L multiplexers
// (one per tap position) pass the taps of row rd_row to the parallel MAC.
// Reads are combinational and show the contents before this cycle's load, so
// a row can be read in the same cycle in which it is loaded. Structure (M
// arrays of length L, L multiplexers, a decoder) follows the document.
module shift_reg_bank
  import chan_pkg::*;
#(
  parameter int M = 3,
  parameter int L = 10,
  localparam int RW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_en,
  input  logic [RW-1:0] load_row,
  input  cdata_t        din,
  input  logic [RW-1:0] rd_row,
  output cdata_t        rd_taps [L]
);

  cdata_t     row_taps [M][L];
  logic [M-1:0] row_sel;

  // Row-address decoder.
  always_comb begin
    row_sel = '0;
    if (load_en) row_sel[load_row] = 1'b1;
  end

  for (genvar r = 0; r < M; r++) begin : g_row
    shift_reg_array #(.L(L)) u_arr (
      .clk     (clk),
      .rst_n   (rst_n),
      .shift_en(row_sel[r]),
      .din     (din),
      .taps    (row_taps[r])
    );
  end

  // One M:1 multiplexer per tap position.
  for (genvar t = 0; t < L; t++) begin : g_mux
    assign rd_taps[t] = row_taps[rd_row][t];
  end

endmodule
