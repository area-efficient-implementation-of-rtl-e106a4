// umts_channelizer: 14-path maximally decimated serial polyphase channelizer
// for UMTS (70 MHz complex input, one 5 MHz-spaced channel out at 5 MHz).
//
// Input samples are loaded into 14 rows of 11 taps, R13 first and R0 last
// (umts_decoder). After each group of 14 one output is formed: row r is
// filtered with coefficient set Cr (taps h[r+14i] of a 154-tap prototype),
// weighted with the phasor exp(j*r*k*2*pi/14) of the selected channel k,
// and the 14 rows are summed. Because the rows hold samples in descending
// order, channel k is the band centred at +k x 5 MHz. Interface: in_valid/din (Q7.8), channel
// (0..13), a coefficient write port (address set*11+tap, Q0.11),
// out_valid/dout (Q9.18). An output appears 8 cycles after the 14th input
// of the period that follows its own. Datapath shared with the WLAN
// channelizer, as the document suggests; timing scheme is this design's own.
module umts_channelizer
  import chan_pkg::*;
#(
  parameter int M = 14,
  parameter int L = 11
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  cdata_t                   din,
  input  logic [$clog2(M)-1:0]     channel,
  input  logic                     coef_we,
  input  logic [$clog2(M*L)-1:0]   coef_addr,
  input  coef_t                    coef_data,
  output logic                     out_valid,
  output cout_t                    dout
);

  logic                 load_en, rd_en, acc_first, acc_last;
  logic [$clog2(M)-1:0] load_row, rd_set;

  umts_decoder #(.M(M)) u_dec (
    .clk, .rst_n, .in_valid,
    .load_en, .load_row, .rd_en, .rd_set, .acc_first, .acc_last
  );

  channelizer_core #(.M(M), .L(L), .NSETS(M)) u_core (
    .clk, .rst_n, .din,
    .load_en, .load_row, .rd_en, .rd_set, .acc_first, .acc_last,
    .channel, .coef_we, .coef_addr, .coef_data,
    .out_valid, .dout
  );

endmodule
