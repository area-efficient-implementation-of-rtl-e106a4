// wlan_channelizer: 3-path serial polyphase channelizer for WLAN with an
// embedded 9/2 resampler (90 MHz complex input, one 30 MHz-spaced channel
// out at 20 MHz).
//
// The 9/2 rate change is realised without zero packing: nine inputs are
// loaded into three 10-deep rows in the order set by wlan_decoder, and two
// outputs are formed per nine inputs, each from the three rows filtered with
// one of six 10-tap coefficient sets C0..C5 (set k = taps h[k+6i] of a
// 60-tap prototype designed at 180 MHz). Row r is weighted by the phasor
// exp(j*r*k*2*pi/3) of the selected channel k and the three rows are summed;
// as sample n sits in row (n+1) mod 3, channel k is the band at -k x 30 MHz.
// Interface: in_valid/din (Q7.8), channel (0..2), a coefficient write port
// (address set*10+tap, Q0.11), out_valid/dout (Q9.18). An output appears 8
// cycles after the third input of the state that follows its own. The
// structure follows the document; valid-based timing is this design's own.
module wlan_channelizer
  import chan_pkg::*;
#(
  parameter int L = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  cdata_t                     din,
  input  logic [1:0]                 channel,
  input  logic                       coef_we,
  input  logic [$clog2(6*L)-1:0]     coef_addr,
  input  coef_t                      coef_data,
  output logic                       out_valid,
  output cout_t                      dout
);

  logic       load_en, rd_en, acc_first, acc_last, state;
  logic [1:0] load_row;
  logic [2:0] rd_set;

  wlan_decoder u_dec (
    .clk, .rst_n, .in_valid,
    .load_en, .load_row, .rd_en, .rd_set, .acc_first, .acc_last, .state
  );

  channelizer_core #(.M(3), .L(L), .NSETS(6)) u_core (
    .clk, .rst_n, .din,
    .load_en, .load_row, .rd_en, .rd_set, .acc_first, .acc_last,
    .channel, .coef_we, .coef_addr, .coef_data,
    .out_valid, .dout
  );

endmodule
