// msr_receiver_top: digital back end of a dual-standard (WLAN + UMTS)
// software radio receiver.
//
// The combined UMTS (2110-2170 MHz) and WLAN (2400-2484.5 MHz) band is
// bandpass sampled at 630 MHz by the ADC; its real samples enter on adc_data
// (Q7.8), one per adc_valid. Two branches run side by side:
//   WLAN: complex bandpass filter -> decimate by 7 (90 MHz) -> +12 MHz
//         translation -> 3-path polyphase channelizer with embedded 9/2
//         resampling -> one 30 MHz channel at 20 MHz on wlan_out.
//   UMTS: complex bandpass filter -> decimate by 9 (70 MHz) -> +2.5 MHz
//         translation -> 14-path maximally decimated channelizer -> one 5 MHz
//         channel at 5 MHz on umts5_out -> arbitrary resampler -> 61.44 MHz
//         on umts_out.
// The channel selectors pick the phasor set of each channelizer. All
// coefficient banks are loaded over one write port: cfg_sel chooses the
// bank (0 WLAN bandpass, 1 UMTS bandpass, 2 WLAN channelizer, 3 UMTS
// channelizer, 4 arbitrary resampler), cfg_addr the word inside it.
// The whole design runs on one clock; the sample rates of the branches are
// expressed by valid strobes (one adc_valid per clock stands for 630 MHz).
// The branch structure and rates follow the document; the single clock,
// the write port and the conversion of the 28-bit channel output to the
// resampler's 16-bit input (shift right 10, saturate) are this design's own.
module msr_receiver_top
  import chan_pkg::*;
#(
  parameter int BPF_TAPS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adc_valid,
  input  data_t      adc_data,
  input  logic       cfg_we,
  input  logic [2:0] cfg_sel,
  input  logic [7:0] cfg_addr,
  input  coef_t      cfg_data,
  input  logic [1:0] wlan_channel,
  input  logic [3:0] umts_channel,
  output logic       wlan_valid,
  output cout_t      wlan_out,
  output logic       umts5_valid,
  output cout_t      umts5_out,
  output logic       umts_valid,
  output cout_t      umts_out
);

  localparam int BAW = $clog2(2 * BPF_TAPS);

  // ---------------- WLAN branch ----------------
  logic   w_bpf_v, w_dec_v, w_mix_v;
  cdata_t w_bpf, w_dec, w_mix;

  bandpass_filter #(.NTAPS(BPF_TAPS)) u_wlan_bpf (
    .clk, .rst_n,
    .in_valid (adc_valid),
    .din      (adc_data),
    .coef_we  (cfg_we && cfg_sel == 3'd0),
    .coef_addr(cfg_addr[BAW-1:0]),
    .coef_data(cfg_data),
    .out_valid(w_bpf_v),
    .dout     (w_bpf)
  );

  downsampler #(.M(7)) u_wlan_rs (
    .clk, .rst_n,
    .in_valid(w_bpf_v), .din(w_bpf),
    .out_valid(w_dec_v), .dout(w_dec)
  );

  spectrum_translator #(.K(2), .P(15)) u_wlan_mix (
    .clk, .rst_n,
    .in_valid(w_dec_v), .din(w_dec),
    .out_valid(w_mix_v), .dout(w_mix)
  );

  wlan_channelizer u_wlan_ch (
    .clk, .rst_n,
    .in_valid (w_mix_v),
    .din      (w_mix),
    .channel  (wlan_channel),
    .coef_we  (cfg_we && cfg_sel == 3'd2),
    .coef_addr(cfg_addr[5:0]),
    .coef_data(cfg_data),
    .out_valid(wlan_valid),
    .dout     (wlan_out)
  );

  // ---------------- UMTS branch ----------------
  logic   u_bpf_v, u_dec_v, u_mix_v;
  cdata_t u_bpf, u_dec, u_mix;

  bandpass_filter #(.NTAPS(BPF_TAPS)) u_umts_bpf (
    .clk, .rst_n,
    .in_valid (adc_valid),
    .din      (adc_data),
    .coef_we  (cfg_we && cfg_sel == 3'd1),
    .coef_addr(cfg_addr[BAW-1:0]),
    .coef_data(cfg_data),
    .out_valid(u_bpf_v),
    .dout     (u_bpf)
  );

  downsampler #(.M(9)) u_umts_rs (
    .clk, .rst_n,
    .in_valid(u_bpf_v), .din(u_bpf),
    .out_valid(u_dec_v), .dout(u_dec)
  );

  spectrum_translator #(.K(1), .P(28)) u_umts_mix (
    .clk, .rst_n,
    .in_valid(u_dec_v), .din(u_dec),
    .out_valid(u_mix_v), .dout(u_mix)
  );

  umts_channelizer u_umts_ch (
    .clk, .rst_n,
    .in_valid (u_mix_v),
    .din      (u_mix),
    .channel  (umts_channel),
    .coef_we  (cfg_we && cfg_sel == 3'd3),
    .coef_addr(cfg_addr),
    .coef_data(cfg_data),
    .out_valid(umts5_valid),
    .dout     (umts5_out)
  );

  // 28-bit Q9.18 channel sample -> 16-bit Q7.8 resampler input.
  cdata_t rs_in;
  assign rs_in.re = sat_data(64'(umts5_out.re >>> (OFRAC - DFRAC)));
  assign rs_in.im = sat_data(64'(umts5_out.im >>> (OFRAC - DFRAC)));

  logic rs_ready;

  arb_resampler u_umts_arb (
    .clk, .rst_n,
    .in_valid (umts5_valid),
    .in_ready (rs_ready),
    .din      (rs_in),
    .coef_we  (cfg_we && cfg_sel == 3'd4),
    .coef_addr(cfg_addr),
    .coef_data(cfg_data),
    .out_valid(umts_valid),
    .dout     (umts_out)
  );

  // The resampler finishes a burst (at most 13 cycles) long before the next
  // 5 MHz sample arrives (126 ADC samples later at full rate).
  a_rs_ready: assert property (@(posedge clk) disable iff (!rst_n)
                               umts5_valid |-> rs_ready)
    else $error("arbitrary resampler busy when a UMTS sample arrived");

endmodule
