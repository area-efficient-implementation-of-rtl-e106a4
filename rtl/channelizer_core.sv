// channelizer_core: datapath of a serial polyphase channelizer with parallel
// MAC, shared by the WLAN and UMTS channelizers.
//
// A decoder supplies, per input sample, the row to load and (when an output
// is being formed) a read of one row with its coefficient set. The selected
// row's L taps and the L coefficients enter the parallel MAC; its result is
// multiplied by the channel phasor of that row (looked up with the row number
// that travelled through the MAC pipeline) and the phasor products of one
// output are summed by the coherent accumulator. Latency from the last read
// of an output to out_valid: 1 + ceil(log2(L)) (MAC) + 2 (phasor) + 1
// (accumulator) cycles. The block structure (shift-register bank,
// coefficient bank, parallel MAC, phasor multiplication, accumulator)
// follows the document.
module channelizer_core
  import chan_pkg::*;
#(
  parameter int M     = 3,
  parameter int L     = 10,
  parameter int NSETS = 6,
  localparam int RW   = (M > 1) ? $clog2(M) : 1,
  localparam int SW   = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int CAW  = $clog2(NSETS * L),
  localparam int AW   = DW + CW + $clog2(L),
  localparam int YW   = AW + PW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cdata_t         din,
  input  logic           load_en,
  input  logic [RW-1:0]  load_row,
  input  logic           rd_en,
  input  logic [SW-1:0]  rd_set,
  input  logic           acc_first,
  input  logic           acc_last,
  input  logic [RW-1:0]  channel,
  input  logic           coef_we,
  input  logic [CAW-1:0] coef_addr,
  input  coef_t          coef_data,
  output logic           out_valid,
  output cout_t          dout
);

  localparam int TAGW = RW + 2;  // {row, first, last}

  cdata_t  taps  [L];
  coef_t   coefs [L];

  shift_reg_bank #(.M(M), .L(L)) u_bank (
    .clk, .rst_n,
    .load_en (load_en),
    .load_row(load_row),
    .din     (din),
    .rd_row  (load_row),
    .rd_taps (taps)
  );

  coef_bank #(.NSETS(NSETS), .L(L)) u_coef (
    .clk, .rst_n,
    .coef_we, .coef_addr, .coef_data,
    .rd_set  (rd_set),
    .rd_coefs(coefs)
  );

  logic                 mac_v;
  logic signed [AW-1:0] mac_re, mac_im;
  logic [TAGW-1:0]      mac_tag;

  parallel_mac #(.L(L), .TAGW(TAGW)) u_mac (
    .clk, .rst_n,
    .in_valid (rd_en),
    .taps     (taps),
    .coefs    (coefs),
    .tag_in   ({load_row, acc_first, acc_last}),
    .out_valid(mac_v),
    .out_re   (mac_re),
    .out_im   (mac_im),
    .tag_out  (mac_tag)
  );

  phasor_t ph;

  phasor_bank #(.M(M)) u_ph (
    .clk, .rst_n,
    .channel(channel),
    .row    (mac_tag[TAGW-1:2]),
    .phasor (ph)
  );

  logic                 pm_v;
  logic signed [YW-1:0] pm_re, pm_im;
  logic [1:0]           pm_tag;

  phasor_mult #(.AW(AW), .TAGW(2)) u_pm (
    .clk, .rst_n,
    .in_valid (mac_v),
    .a_re     (mac_re),
    .a_im     (mac_im),
    .p        (ph),
    .tag_in   (mac_tag[1:0]),
    .out_valid(pm_v),
    .y_re     (pm_re),
    .y_im     (pm_im),
    .tag_out  (pm_tag)
  );

  coherent_accumulator #(.IW(YW), .SHIFT(DFRAC + CFRAC + PFRAC - OFRAC)) u_acc (
    .clk, .rst_n,
    .in_valid (pm_v),
    .first    (pm_tag[1]),
    .last     (pm_tag[0]),
    .din_re   (pm_re),
    .din_im   (pm_im),
    .out_valid(out_valid),
    .dout     (dout)
  );

endmodule
