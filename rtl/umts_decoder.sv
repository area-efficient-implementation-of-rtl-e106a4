// umts_decoder: one-state controller of the maximally decimated UMTS
// channelizer.
//
// Every M (14) input samples are loaded into rows R13, R12, ..., R0; after
// R0 is loaded one output is due, for which row r uses coefficient set Cr.
// The M row reads of that output are issued during the next M loads, each
// on the row about to shift, so a new output is computed every M samples
// with no idle cycles. The first output appears after the first full period.
// Outputs are combinational in a position counter and in_valid. The load
// order follows the document; the read scheduling is this design's choice.
module umts_decoder #(
  parameter int M = 14,
  localparam int RW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          load_en,
  output logic [RW-1:0] load_row,
  output logic          rd_en,
  output logic [RW-1:0] rd_set,
  output logic          acc_first,
  output logic          acc_last
);

  logic [RW-1:0] pos;
  logic          primed;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos    <= '0;
      primed <= 1'b0;
    end else if (in_valid) begin
      pos <= (int'(pos) == M - 1) ? '0 : pos + 1'b1;
      if (int'(pos) == M - 1) primed <= 1'b1;
    end
  end

  always_comb begin
    load_en   = in_valid;
    load_row  = RW'(M - 1 - int'(pos));
    rd_en     = in_valid && primed;
    rd_set    = load_row;
    acc_first = (pos == '0);
    acc_last  = (int'(pos) == M - 1);
  end

endmodule
