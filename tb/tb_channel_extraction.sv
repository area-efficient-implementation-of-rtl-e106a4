// tb_channel_extraction: functional workload test of both channelizers.
//
// Loads windowed-sinc lowpass prototypes computed here (Hamming window):
// WLAN 60 taps at 180 MHz, cutoff 12 MHz, DC gain 2 (the 1:2 zero packing
// halves it); UMTS 154 taps at 70 MHz, cutoff 2.5 MHz, DC gain 1; both in
// Q0.11. It then feeds complex tones placed 1 MHz (WLAN) or 0.5 MHz (UMTS)
// above the centre of channel t and selects channel k. WLAN channel k is
// the band centred at -k x 30 MHz (fs 90 MHz: its rows hold samples in
// ascending order); UMTS channel k is centred at +k x 5 MHz (fs 70 MHz: rows
// R13..R0 hold samples in descending order). After the filter transient, the mean output power must be
// within -2/+1 dB of the tone power when t = k and at least 30 dB below it
// when t != k. Covers all 3 x 3 WLAN pairs and 4 x 3 UMTS pairs.
module tb_channel_extraction;
  import chan_pkg::*;
  import tb_util_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 40.0;          // tone amplitude, input units

  logic clk = 0, rst_n = 0, in_valid = 0;
  cdata_t din = '0;
  logic [1:0] ch_w = 0;
  logic [3:0] ch_u = 0;
  logic we_w = 0, we_u = 0;
  logic [5:0] addr_w = 0;
  logic [7:0] addr_u = 0;
  coef_t cdata = 0;
  logic ov_w, ov_u;
  cout_t dw, du;
  int checks = 0, failures = 0;

  wlan_channelizer u_w (.clk, .rst_n, .in_valid, .din, .channel(ch_w), .coef_we(we_w),
                        .coef_addr(addr_w), .coef_data(cdata), .out_valid(ov_w), .dout(dw));
  umts_channelizer u_u (.clk, .rst_n, .in_valid, .din, .channel(ch_u), .coef_we(we_u),
                        .coef_addr(addr_u), .coef_data(cdata), .out_valid(ov_u), .dout(du));

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Hamming-windowed sinc, gain g, cutoff fc/fs, length n; returns Q0.11.
  function automatic longint proto(int j, int n, real fc, real g);
    real t, s, w;
    t = real'(j) - real'(n - 1) / 2.0;
    s = (t == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(j) / real'(n - 1));
    return longint'($floor(g * s * w * 2048.0 + 0.5));
  endfunction

  int wcnt = 0, ucnt = 0;
  real wpow = 0.0, upow = 0.0;
  always @(posedge clk) if (rst_n) begin
    if (ov_w) begin
      wcnt++;
      wpow += ($pow(real'(dw.re), 2) + $pow(real'(dw.im), 2)) / $pow(2.0, 36);
    end
    if (ov_u) begin
      ucnt++;
      upow += ($pow(real'(du.re), 2) + $pow(real'(du.im), 2)) / $pow(2.0, 36);
    end
  end

  // Stream a tone at frequency f (fraction of fs); return mean output power of
  // the last nmeas outputs of the chosen channelizer after nskip outputs.
  task automatic tone(real f, bit umts, int nskip, int nmeas, output real pw);
    int n;
    n = 0;
    forever begin
      @(negedge clk);
      if (n == 0) begin wcnt = 0; ucnt = 0; end
      if ((umts ? ucnt : wcnt) == nskip && n > 0) begin wpow = 0.0; upow = 0.0; end
      if ((umts ? ucnt : wcnt) >= nskip + nmeas) break;
      in_valid = 1;
      din.re = data_t'($rtoi($floor(AMP * 256.0 * $cos(2.0 * PI * f * n) + 0.5)));
      din.im = data_t'($rtoi($floor(AMP * 256.0 * $sin(2.0 * PI * f * n) + 0.5)));
      n++;
    end
    pw = (umts ? upow : wpow) / nmeas;
  endtask

  task automatic judge(string name, int k, int t, real pw);
    real db;
    db = 10.0 * $log10(pw / (AMP * AMP) + 1.0e-12);
    checks++;
    if ((t == k && (db < -2.0 || db > 1.0)) || (t != k && db > -30.0)) begin
      failures++;
      $display("%s channel %0d, tone in channel %0d: %0.1f dB  FAIL", name, k, t, db);
    end else
      $display("%s channel %0d, tone in channel %0d: %0.1f dB", name, k, t, db);
  endtask

  initial begin
    real pw;
    int ks [4] = '{0, 3, 7, 12};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 60; j++) begin
      @(negedge clk); we_w = 1; addr_w = 6'((j % 6) * 10 + j / 6); cdata = coef_t'(proto(j, 60, 12.0 / 180.0, 2.0));
    end
    @(negedge clk); we_w = 0;
    for (int j = 0; j < 154; j++) begin
      @(negedge clk); we_u = 1; addr_u = 8'((j % 14) * 11 + j / 14); cdata = coef_t'(proto(j, 154, 2.5 / 70.0, 1.0));
    end
    @(negedge clk); we_u = 0;
    // WLAN: channel k at -30k MHz, fs = 90 MHz
    for (int k = 0; k < 3; k++) begin
      ch_w = 2'(k);
      for (int t = 0; t < 3; t++) begin
        tone((-30.0 * t + 1.0) / 90.0, 1'b0, 10, 12, pw);
        judge("WLAN", k, t, pw);
      end
    end
    // UMTS: channel k at +5k MHz, fs = 70 MHz
    for (int i = 0; i < 4; i++) begin
      ch_u = 4'(ks[i]);
      for (int d = -1; d <= 1; d++) begin
        tone((5.0 * ((ks[i] + d + 14) % 14) + 0.5) / 70.0, 1'b1, 14, 10, pw);
        judge("UMTS", ks[i], (ks[i] + d + 14) % 14, pw);
      end
    end
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
