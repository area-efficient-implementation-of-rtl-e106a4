// tb_arb_resampler: loads a random 176-tap prototype (set p = h[p+16i]) and
// feeds 125 random input samples, each as soon as in_ready allows (with
// random extra gaps). Checks every output against a model that advances the
// sub-filter index by 125/96 per output and takes a new sample when it wraps
// past 16: y = sum_i h[set+16i] * x[n-i], shifted right by 1, saturated to 28
// bits. Also checks the rate: 12 or 13 outputs (busy cycles) per input and exactly 1536
// outputs for 125 inputs (16 * 96 / 125 = 12.288 per input).
module tb_arb_resampler;
  import chan_pkg::*;
  import tb_util_pkg::*;
  localparam int NPH = 16, L = 11, NT = NPH * L, NIN = 125;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  cdata_t din = '0;
  logic coef_we = 0;
  logic [7:0] coef_addr = 0;
  coef_t coef_data = 0;
  logic out_valid;
  cout_t dout;
  int checks = 0, failures = 0;

  arb_resampler dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint h [NT];
  longint xr [NIN+1], xi [NIN+1];
  longint er [$], ei [$];
  int nout = 0, n12 = 0, n13 = 0, busy = 0, prev_cnt = 0;
  always @(negedge clk) if (rst_n && !in_ready) busy++;

  always @(negedge clk) if (rst_n && out_valid) begin
    nout++;
    checks++;
    if (er.size() == 0 || dout.re !== er[0] || dout.im !== ei[0]) begin
      failures++;
      if (failures < 5 && er.size() > 0) $display("out %0d got %0d,%0d exp %0d,%0d", nout, dout.re, dout.im, er[0], ei[0]);
    end
    if (er.size() > 0) begin void'(er.pop_front()); void'(ei.pop_front()); end
  end

  initial begin
    int phase, set, gap, cnt;
    longint sr, si;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NT; j++) begin
      h[j] = rnd(CW);
      coef_we = 1; coef_addr = 8'((j % NPH) * L + j / NPH); coef_data = coef_t'(h[j]);
      @(negedge clk);
    end
    coef_we = 0;
    xr[0] = 0; xi[0] = 0;
    phase = 0;
    for (int n = 1; n <= NIN; n++) begin
      xr[n] = rnd(DW); xi[n] = rnd(DW);
      // expected outputs for this input
      cnt = 0;
      forever begin
        cnt++;
        set = phase / 96;
        sr = 0; si = 0;
        for (int i = 0; i < L; i++) if (n - i >= 1) begin
          sr += h[set + NPH * i] * xr[n - i];
          si += h[set + NPH * i] * xi[n - i];
        end
        er.push_back(sat(asr(sr, 1), OW)); ei.push_back(sat(asr(si, 1), OW));
        phase += 125;
        if (phase >= 1536) begin phase -= 1536; break; end
      end
      gap = $urandom % 3;
      repeat (gap) @(negedge clk);
      while (!in_ready) @(negedge clk);
      // the previous input kept the resampler busy for one cycle per output
      if (n > 1) begin
        checks++;
        if (busy !== prev_cnt || (busy !== 12 && busy !== 13)) begin
          failures++; $display("input %0d: busy %0d cycles, expected %0d outputs", n - 1, busy, prev_cnt);
        end
        if (busy == 12) n12++; else if (busy == 13) n13++;
      end
      busy = 0;
      prev_cnt = cnt;
      in_valid = 1; din.re = data_t'(xr[n]); din.im = data_t'(xi[n]);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (30) @(negedge clk);
    checks++;
    if (nout !== 1536) begin failures++; $display("%0d outputs for %0d inputs, expected 1536", nout, NIN); end
    checks++;
    if (n12 == 0 || n13 == 0) begin failures++; $display("bursts of 12: %0d, of 13: %0d", n12, n13); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
