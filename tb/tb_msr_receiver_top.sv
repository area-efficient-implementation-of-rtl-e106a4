// tb_msr_receiver_top: end-to-end test of the dual-standard receiver at its
// default parameters.
//
// Loads random coefficients into all five banks through the configuration
// port, drives random real ADC samples and checks every output of both
// branches bit-exactly against a chained software model: complex bandpass
// FIR (>>11, saturate) -> keep every 7th/9th sample -> oscillator
// exp(j*2*pi*2n/15) / exp(j*2*pi*n/28) (>>14, saturate) -> WLAN 9/2
// channelizer or UMTS 14-path channelizer (>>15, saturate to 28 bits) ->
// for UMTS, >>10 and saturate to 16 bits, then the 125/96-step arbitrary
// interpolator (>>1, saturate). Two runs, separated by a reset, use different
// channel selections; the second run has gaps in the ADC stream.
// Mechanisms counted (each must occur): coefficient writes to every bank,
// WLAN outputs of state 0 and of state 1, UMTS 5 MHz outputs, resampler
// bursts of 12 and of 13 outputs, a channel switch, and ADC gaps. The output
// counts per run are checked against the rates 2/63 (WLAN), 1/126 (UMTS)
// and 12.288 resampled outputs per UMTS sample.
module tb_msr_receiver_top;
  import chan_pkg::*;
  import tb_util_pkg::*;

  localparam int NB = 16;             // bandpass taps (top default)
  localparam int NADC = 2400;         // ADC samples per run

  logic clk = 0, rst_n = 0, adc_valid = 0;
  data_t adc_data = '0;
  logic cfg_we = 0;
  logic [2:0] cfg_sel = 0;
  logic [7:0] cfg_addr = 0;
  coef_t cfg_data = 0;
  logic [1:0] wlan_channel = 0;
  logic [3:0] umts_channel = 0;
  logic wlan_valid, umts5_valid, umts_valid;
  cout_t wlan_out, umts5_out, umts_out;

  int checks = 0, failures = 0;

  msr_receiver_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- coefficients ----------------
  longint bw_r [NB], bw_i [NB], bu_r [NB], bu_i [NB];
  longint hw [60], hu [154], ha [176];
  int bank_writes [5];

  task automatic cfg_write(int sel, int addr, longint val);
    @(negedge clk);
    cfg_we = 1; cfg_sel = 3'(sel); cfg_addr = 8'(addr); cfg_data = coef_t'(val);
    bank_writes[sel]++;
  endtask

  task automatic load_coefs();
    for (int i = 0; i < NB; i++) begin
      bw_r[i] = rnd(10); bw_i[i] = rnd(10); bu_r[i] = rnd(10); bu_i[i] = rnd(10);
      cfg_write(0, 2*i, bw_r[i]); cfg_write(0, 2*i+1, bw_i[i]);
      cfg_write(1, 2*i, bu_r[i]); cfg_write(1, 2*i+1, bu_i[i]);
    end
    for (int j = 0; j < 60; j++)  begin hw[j] = rnd(CW); cfg_write(2, (j % 6) * 10 + j / 6, hw[j]); end
    for (int j = 0; j < 154; j++) begin hu[j] = rnd(CW); cfg_write(3, (j % 14) * 11 + j / 14, hu[j]); end
    for (int j = 0; j < 176; j++) begin ha[j] = rnd(CW); cfg_write(4, (j % 16) * 11 + j / 16, ha[j]); end
    @(negedge clk); cfg_we = 0;
  endtask

  // ---------------- model ----------------
  longint adc [NADC];
  longint wr [$], wi [$], ur [$], ui [$];        // mixer outputs (channelizer inputs)
  longint ew_r [$], ew_i [$], eu_r [$], eu_i [$], ea_r [$], ea_i [$];
  int ew_state [$];

  task automatic model(int kw, int ku);
    longint sr, si, br, bi, ar, ai, er, ei, xr, xi;
    int m, n, row, phase, set, nw, nu, nadd;
    longint rr [$], ri [$];
    wr.delete(); wi.delete(); ur.delete(); ui.delete();
    // front end
    for (int t = 0; t < NADC; t++) begin
      if (t % 7 == 0) begin
        sr = 0; si = 0;
        for (int i = 0; i < NB; i++) if (t - i >= 0) begin sr += adc[t-i] * bw_r[i]; si += adc[t-i] * bw_i[i]; end
        br = sat(asr(sr, 11), 16); bi = sat(asr(si, 11), 16);
        n = wr.size();
        wr.push_back(sat(asr(br * ph_re((2 * n) % 15, 15) - bi * ph_im((2 * n) % 15, 15), 14), 16));
        wi.push_back(sat(asr(br * ph_im((2 * n) % 15, 15) + bi * ph_re((2 * n) % 15, 15), 14), 16));
      end
      if (t % 9 == 0) begin
        sr = 0; si = 0;
        for (int i = 0; i < NB; i++) if (t - i >= 0) begin sr += adc[t-i] * bu_r[i]; si += adc[t-i] * bu_i[i]; end
        br = sat(asr(sr, 11), 16); bi = sat(asr(si, 11), 16);
        n = ur.size();
        ur.push_back(sat(asr(br * ph_re(n % 28, 28) - bi * ph_im(n % 28, 28), 14), 16));
        ui.push_back(sat(asr(br * ph_im(n % 28, 28) + bi * ph_re(n % 28, 28), 14), 16));
      end
    end
    // WLAN channelizer: sample n (1-based) = wr[n-1]
    nw = wr.size();
    for (int p = 0; ; p++) begin
      if (((p % 2 == 0) ? 9 * (p / 2) + 8 : 9 * (p / 2) + 12) > nw) break;
      m = 10 + 9 * p; ar = 0; ai = 0;
      for (int j = 0; j < 60; j++) begin
        if ((m - j) % 2 !== 0 || m - j < 2) continue;
        n = (m - j) / 2; row = (n + 1) % 3;
        er = hw[j] * wr[n-1]; ei = hw[j] * wi[n-1];
        ar += er * ph_re(row * kw, 3) - ei * ph_im(row * kw, 3);
        ai += er * ph_im(row * kw, 3) + ei * ph_re(row * kw, 3);
      end
      ew_r.push_back(sat(asr(ar, 15), OW)); ew_i.push_back(sat(asr(ai, 15), OW));
      ew_state.push_back(p % 2);
    end
    // UMTS channelizer and arbitrary resampler
    nu = ur.size(); phase = 0;
    for (int p = 0; 14 * (p + 2) <= nu; p++) begin
      ar = 0; ai = 0;
      for (int j = 0; j < 154; j++) begin
        n = 14 * (p + 1) - j;
        if (n < 1) continue;
        row = j % 14;
        er = hu[j] * ur[n-1]; ei = hu[j] * ui[n-1];
        ar += er * ph_re((row * ku) % 14, 14) - ei * ph_im((row * ku) % 14, 14);
        ai += er * ph_im((row * ku) % 14, 14) + ei * ph_re((row * ku) % 14, 14);
      end
      ar = sat(asr(ar, 15), OW); ai = sat(asr(ai, 15), OW);
      eu_r.push_back(ar); eu_i.push_back(ai);
      rr.push_front(sat(asr(ar, 10), 16)); ri.push_front(sat(asr(ai, 10), 16));
      forever begin
        set = phase / 96; xr = 0; xi = 0;
        for (int i = 0; i < 11 && i < rr.size(); i++) begin xr += ha[set + 16 * i] * rr[i]; xi += ha[set + 16 * i] * ri[i]; end
        ea_r.push_back(sat(asr(xr, 1), OW)); ea_i.push_back(sat(asr(xi, 1), OW));
        phase += 125;
        if (phase >= 1536) begin phase -= 1536; break; end
      end
    end
  endtask

  // ---------------- output checking ----------------
  int n_w_state [2], n_u5, n_burst12, n_burst13, n_switch, n_gaps, n_a;
  int run_w, run_u5, run_a, burst;

  always @(negedge clk) if (rst_n) begin
    if (wlan_valid) begin
      checks++;
      if (ew_r.size() == 0 || wlan_out.re !== ew_r[0] || wlan_out.im !== ew_i[0]) begin
        failures++;
        if (failures < 6 && ew_r.size() > 0) $display("WLAN out %0d: got %0d,%0d exp %0d,%0d", run_w, wlan_out.re, wlan_out.im, ew_r[0], ew_i[0]);
      end
      if (ew_r.size() > 0) begin
        n_w_state[ew_state[0]]++;
        void'(ew_r.pop_front()); void'(ew_i.pop_front()); void'(ew_state.pop_front());
      end
      run_w++;
    end
    if (umts5_valid) begin
      checks++;
      if (eu_r.size() == 0 || umts5_out.re !== eu_r[0] || umts5_out.im !== eu_i[0]) begin
        failures++;
        if (failures < 6 && eu_r.size() > 0) $display("UMTS5 out %0d: got %0d exp %0d", run_u5, umts5_out.re, eu_r[0]);
      end
      if (eu_r.size() > 0) begin void'(eu_r.pop_front()); void'(eu_i.pop_front()); end
      n_u5++; run_u5++;
      if (run_u5 > 1) begin
        if (burst == 12) n_burst12++; else if (burst == 13) n_burst13++;
      end
      burst = 0;
    end
    if (umts_valid) begin
      checks++;
      if (ea_r.size() == 0 || umts_out.re !== ea_r[0] || umts_out.im !== ea_i[0]) begin
        failures++;
        if (failures < 6 && ea_r.size() > 0) $display("UMTS out %0d: got %0d exp %0d", run_a, umts_out.re, ea_r[0]);
      end
      if (ea_r.size() > 0) begin void'(ea_r.pop_front()); void'(ea_i.pop_front()); end
      burst++; run_a++; n_a++;
    end
  end

  task automatic run(int kw, int ku, bit gaps);
    int nw_exp, nu_exp, na_exp;
    rst_n = 0; adc_valid = 0;
    wlan_channel = 2'(kw); umts_channel = 4'(ku);
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    run_w = 0; run_u5 = 0; run_a = 0; burst = 0;
    load_coefs();
    for (int t = 0; t < NADC; t++) adc[t] = rnd(13);
    ew_r.delete(); ew_i.delete(); ew_state.delete(); eu_r.delete(); eu_i.delete(); ea_r.delete(); ea_i.delete();
    model(kw, ku);
    nw_exp = ew_r.size(); nu_exp = eu_r.size(); na_exp = ea_r.size();
    for (int t = 0; t < NADC; t++) begin
      if (gaps && ($urandom % 5 == 0)) begin
        adc_valid = 0; n_gaps++;
        @(negedge clk);
      end
      adc_valid = 1; adc_data = data_t'(adc[t]);
      @(negedge clk);
    end
    adc_valid = 0;
    repeat (60) @(negedge clk);
    // rates: every modelled output appeared, no extra ones
    checks++;
    if (run_w !== nw_exp || run_u5 !== nu_exp || run_a !== na_exp) begin
      failures++;
      $display("output counts %0d/%0d/%0d, expected %0d/%0d/%0d", run_w, run_u5, run_a, nw_exp, nu_exp, na_exp);
    end
    // 2 WLAN outputs per 63 ADC samples, 1 UMTS output per 126
    checks++;
    if (run_w < 2 * (NADC / 63) - 2 || run_w > 2 * (NADC / 63) + 1 || run_u5 < NADC / 126 - 2 || run_u5 > NADC / 126) begin
      failures++;
      $display("rates wrong: %0d WLAN, %0d UMTS outputs for %0d ADC samples", run_w, run_u5, NADC);
    end
    $display("run: %0d ADC samples -> %0d WLAN (20 MHz), %0d UMTS (5 MHz), %0d UMTS (61.44 MHz) outputs", NADC, run_w, run_u5, run_a);
  endtask

  initial begin
    @(negedge clk);
    run(1, 3, 1'b0);
    n_switch++;
    run(2, 11, 1'b1);
    checks++;
    if (bank_writes[0] == 0 || bank_writes[1] == 0 || bank_writes[2] == 0 || bank_writes[3] == 0 || bank_writes[4] == 0) begin
      failures++; $display("a coefficient bank was never written");
    end
    checks++;
    if (n_w_state[0] == 0 || n_w_state[1] == 0) begin failures++; $display("WLAN state outputs %0d/%0d", n_w_state[0], n_w_state[1]); end
    checks++;
    if (n_u5 == 0 || n_a == 0) begin failures++; $display("no UMTS outputs"); end
    checks++;
    if (n_burst12 == 0 || n_burst13 == 0) begin failures++; $display("resampler bursts 12:%0d 13:%0d", n_burst12, n_burst13); end
    checks++;
    if (n_switch == 0 || n_gaps == 0) begin failures++; $display("no channel switch or no ADC gap"); end
    $display("mechanisms: WLAN state0 %0d state1 %0d, UMTS5 %0d, resampled %0d, bursts12 %0d bursts13 %0d, channel switches %0d, ADC gaps %0d",
             n_w_state[0], n_w_state[1], n_u5, n_a, n_burst12, n_burst13, n_switch, n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
